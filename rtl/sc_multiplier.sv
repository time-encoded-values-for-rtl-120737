`timescale 1ps/1fs
// sc_multiplier: stochastic multiplier for time-encoded (PWM) or bit-stream
// operands.
//
// In the unipolar format a value x in [0,1] is the fraction of time a signal
// is high, and a single AND gate multiplies two such values when the operands
// are independent. In the bipolar format (y = 2x-1 in [-1,1]) an XNOR gate
// does the same job. With periodic PWM operands, independence comes from
// choosing periods that are not harmonically related (relatively prime when
// measured in a common time unit) and averaging the output over the least
// common multiple of the two periods; the product is then exact.
//
// Interface: a, b are the operand signals, y the product signal.
// Timing: purely combinational, one gate delay. The BIPOLAR parameter
// (0 = AND, 1 = XNOR) selects the format; the AND gate is the default, as
// used for the unipolar multipliers throughout the design.
module sc_multiplier #(
  parameter bit BIPOLAR = 1'b0
) (
  input  logic a,
  input  logic b,
  output logic y
);
  always_comb begin
    if (BIPOLAR) y = ~(a ^ b);
    else         y = a & b;
  end
endmodule
