`timescale 1ps/1fs
// pwm_generator: BEHAVIOURAL MODEL (not synthesizable) of the low-cost PWM
// generator that turns a sensed current into a time-encoded value.
//
// A ramp generator (capacitor charged by the input current, discharged by
// the Reset pulse) feeds the + input of an analog comparator whose - input
// is the fixed reference VREF_V. Each Reset pulse starts a PWM period: the
// output is low until the ramp crosses VREF_V, then high until the next
// Reset. The period is therefore the Reset period T, the high part sits at
// the end of every period, and the duty cycle is
//   D = 1 - (T_reset + C_F * VREF_V / i_in) / T,
// which grows with the input current. Generators reset by the same pulse
// produce synchronized (maximally overlapping) signals.
//
// Interface: i_in input current (A), reset the Reset pulse from a clock
// generator, pwm the output signal.
module pwm_generator #(
  parameter real C_F     = 5.0e-15,
  parameter real VREF_V  = 0.5,
  parameter real VDD_V   = 1.0,
  parameter real STEP_PS = 0.1
) (
  input  real  i_in,
  input  logic reset,
  output logic pwm
);
  real v_ramp;
  real v_ref;

  assign v_ref = VREF_V;

  ramp_generator #(.C_F(C_F), .VDD_V(VDD_V), .STEP_PS(STEP_PS)) u_ramp (
    .i_in(i_in), .rst(reset), .v_ramp(v_ramp)
  );

  analog_comparator u_cmp (.v_plus(v_ramp), .v_minus(v_ref), .out(pwm));
endmodule
