`timescale 1ps/1fs
// sc_abs_subtractor: stochastic absolute-value subtraction |x1 - x2|.
//
// An XOR gate fed with two maximally correlated signals (their high parts
// overlap as much as possible) is high exactly where one operand is high and
// the other low, i.e. for a fraction |x1 - x2| of the time. For PWM operands
// this means the same period and the high part of each placed at the same
// end of the period; the exact result is then available after a single
// period. With independent operands the same gate would instead compute
// x1(1-x2) + x2(1-x1).
//
// Interface: a, b operands, y result. Timing: purely combinational.
module sc_abs_subtractor (
  input  logic a,
  input  logic b,
  output logic y
);
  always_comb y = a ^ b;
endmodule
