`timescale 1ps/1fs
// ramp_generator: BEHAVIOURAL MODEL (not synthesizable) of the ramp
// generator of the PWM generator: a capacitor C_F charged by the sensed input
// current and discharged by a switch closed by the Reset pulse.
//
// While rst is high the capacitor voltage is held at 0 V; otherwise it rises
// with slope i_in / C_F and saturates at the supply VDD_V. The voltage is
// recomputed every STEP_PS picoseconds; a Reset pulse must be wider than
// STEP_PS to be seen.
//
// Interface: i_in input current in amperes, rst discharge switch control,
// v_ramp the capacitor voltage in volts.
module ramp_generator #(
  parameter real C_F     = 5.0e-15,
  parameter real VDD_V   = 1.0,
  parameter real STEP_PS = 0.1
) (
  input  real  i_in,
  input  logic rst,
  output real  v_ramp
);
  real v;

  initial v = 0.0;

  always begin
    #(STEP_PS);
    if (rst) v = 0.0;
    else begin
      v = v + i_in * STEP_PS * 1.0e-12 / C_F;
      if (v > VDD_V) v = VDD_V;
    end
  end

  assign v_ramp = v;
endmodule
