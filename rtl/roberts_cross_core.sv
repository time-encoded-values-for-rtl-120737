`timescale 1ps/1fs
// roberts_cross_core: stochastic core of the Robert's cross edge detector.
//
// Computes s(i,j) = ( |r(i,j) - r(i+1,j+1)| + |r(i+1,j) - r(i,j+1)| ) / 2
// from four correlated (synchronized) pixel signals. Each diagonal
// difference is one XOR absolute-value subtractor; a 2:1 multiplexer driven
// by a 50% select signal averages the two differences. The XOR outputs have
// the pixel period, so with a select period that is not harmonically related
// (for example a 3:2 ratio of pixel to select period) the average over the
// least common multiple of the two periods is the exact result.
//
// Interface: r_ij, r_i1j1 feed the first XOR (multiplexer input 0), r_i1j and
// r_ij1 the second XOR (multiplexer input 1); sel is the select signal.
// Timing: purely combinational, two gate levels.
module roberts_cross_core (
  input  logic r_ij,
  input  logic r_i1j1,
  input  logic r_i1j,
  input  logic r_ij1,
  input  logic sel,
  output logic s_ij
);
  logic diag_main, diag_anti;

  sc_abs_subtractor u_xor0 (.a(r_ij),  .b(r_i1j1), .y(diag_main));
  sc_abs_subtractor u_xor1 (.a(r_i1j), .b(r_ij1),  .y(diag_anti));
  sc_scaled_adder   u_mux  (.in0(diag_main), .in1(diag_anti), .sel(sel), .y(s_ij));
endmodule
