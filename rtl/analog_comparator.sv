`timescale 1ps/1fs
// analog_comparator: BEHAVIOURAL MODEL (not synthesizable) of the analog
// comparator of the PWM generator.
//
// out is high while v_plus exceeds v_minus by more than the input offset
// VOS_V. The model is ideal otherwise: no delay, noise or hysteresis (the
// latch-based comparator it stands for decides within a picosecond).
//
// Interface: v_plus, v_minus in volts; out the digital decision.
module analog_comparator #(
  parameter real VOS_V = 0.0
) (
  input  real  v_plus,
  input  real  v_minus,
  output logic out
);
  always_comb out = (v_plus - v_minus) > VOS_V;
endmodule
