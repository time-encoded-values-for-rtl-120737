`timescale 1ps/1fs
// multilevel_mixed: two-level stochastic circuit combining all three basic
// operations:  y = (1-s) * (p1 * p2) + s * |p3a - p3b|.
//
// An AND gate multiplies p1 and p2 (periods P1, P2, relatively prime), an XOR
// gate takes the absolute difference of two synchronized signals of period
// P3, and a multiplexer whose select p4 has period P4 averages the two. The
// AND output has period P1*P2 and the XOR output period P3; with
// P3 = P1*P2 odd and P4 a small even period the whole circuit needs only
// P3*P4 of operation time.
//
// Interface: p1, p2 multiplier operands; p3a, p3b the synchronized
// subtractor operands; p4 the select (AND product on 0, XOR on 1); y result.
// Timing: purely combinational.
module multilevel_mixed (
  input  logic p1,
  input  logic p2,
  input  logic p3a,
  input  logic p3b,
  input  logic p4,
  output logic y
);
  logic prod, diff;

  sc_multiplier     u_and (.a(p1), .b(p2), .y(prod));
  sc_abs_subtractor u_xor (.a(p3a), .b(p3b), .y(diff));
  sc_scaled_adder   u_mux (.in0(prod), .in1(diff), .sel(p4), .y(y));
endmodule
