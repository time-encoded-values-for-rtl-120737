`timescale 1ps/1fs
// sc_scaled_adder: stochastic scaled addition with a 2:1 multiplexer.
//
// With a select signal that is high a fraction s of the time, the output is
// high a fraction (1-s)*x0 + s*x1 of the time: for s = 0.5 this is the
// average of the two operands. Only one operand reaches the output at a
// time, so the operands may be fully correlated (for instance PWM signals
// of the same period). The select signal's period must not be harmonically
// related to the operands' period; an even select period against odd operand
// periods, run for the least common multiple of the periods, gives the most
// accurate result.
//
// With SUBTRACT = 1 the operand on input 1 is inverted before the MUX. An
// inverted signal carries -x in the bipolar code, so the output then carries
// the scaled difference (1-s)*x0 - s*x1 (bipolar), (x0 - x1)/2 for s = 0.5.
// This is the usual way of turning the stochastic scaled adder into a scaled
// subtractor; the inverter is this design's realisation.
//
// Interface: in0 is passed while sel = 0, in1 (inverted when SUBTRACT) while
// sel = 1.
// Timing: purely combinational.
module sc_scaled_adder #(
  parameter bit SUBTRACT = 1'b0
) (
  input  logic in0,
  input  logic in1,
  input  logic sel,
  output logic y
);
  always_comb y = sel ? (in1 ^ SUBTRACT) : in0;
endmodule
