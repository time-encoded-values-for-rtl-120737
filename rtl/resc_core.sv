`timescale 1ps/1fs
// resc_core: ReSC (reconfigurable stochastic computing) core that evaluates
// a Bernstein polynomial  y = sum_k b_k * C(n,k) x^k (1-x)^(n-k).
//
// DEGREE independent copies of the input signal x are added: at every
// instant the adder output k (0..DEGREE) is the number of copies that are
// high, which for independent copies is binomially distributed. k selects
// which of the DEGREE+1 coefficient signals b_0..b_DEGREE reaches the output,
// so the output's high fraction is the polynomial above. The default degree
// of six matches the gamma correction (x^0.45) circuit.
//
// Interface: x[DEGREE-1:0] the input copies, b[DEGREE:0] the coefficient
// signals, sum the adder output (exposed for observation), y the result.
// Timing: purely combinational (adder followed by a multiplexer).
module resc_core #(
  parameter int DEGREE = 6
) (
  input  logic [DEGREE-1:0]         x,
  input  logic [DEGREE:0]           b,
  output logic [$clog2(DEGREE+1)-1:0] sum,
  output logic                      y
);
  always_comb begin
    sum = '0;
    for (int i = 0; i < DEGREE; i++) sum = sum + ($clog2(DEGREE+1))'(x[i]);
  end

  always_comb y = b[sum];
endmodule
