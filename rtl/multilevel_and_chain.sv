`timescale 1ps/1fs
// multilevel_and_chain: multi-level stochastic product of N signals.
//
// A chain of N-1 two-input AND multipliers: level 1 multiplies p[0] by p[1],
// each further level multiplies the previous product by the next input. The
// output of a level is periodic, with the least common multiple of its
// inputs' periods as its period, so it can feed the next level directly. With
// pairwise relatively prime input periods the output, averaged over the
// product of all periods, equals the product of the N input values exactly.
//
// Interface: p[N-1:0] input signals (p[0] = first level), y the product.
// Timing: purely combinational, N-1 gate levels. N defaults to the four-input
// example; it must be at least 2.
module multilevel_and_chain #(
  parameter int N = 4
) (
  input  logic [N-1:0] p,
  output logic         y
);
  logic [N-1:0] level;  // level[k] = product of p[0..k]

  assign level[0] = p[0];
  for (genvar k = 1; k < N; k++) begin : g_level
    sc_multiplier u_and (.a(level[k-1]), .b(p[k]), .y(level[k]));
  end
  assign y = level[N-1];
endmodule
