`timescale 1ps/1fs
// pwm_sc_top: BEHAVIOURAL MODEL (contains analog parts) of the time-encoded
// stochastic image-processing front end: the Robert's cross edge detector and
// the gamma correction engine side by side, each processing one pixel per
// operation. Next to them stand the two multi-level gate examples (a chain
// of AND multipliers, and an AND and an XOR combined by a MUX), which work
// on PWM signals supplied from outside.
//
// Both engines take sensed pixel intensities as currents, encode them as PWM
// signals (value = duty cycle) with ramp/comparator generators clocked by
// ring oscillators, compute with a few gates, and return the result as an
// analog voltage from an integrator. The engines share nothing but the
// constants of pwm_sc_pkg.
//
// Interface (per engine, prefix rc_ or g_): *_en runs the engine's ring
// oscillators. *_frame pulses at the start of every input-pixel period. An
// operation: apply the pixel currents, let one pixel period pass, release
// *_clear at a rising edge of *_frame, read the voltage one operation time
// later (about 0.98 ns for Robert's cross, 1.81 ns for gamma: the constants
// RC_T_OP_PS and GAMMA_T_OP_PS of pwm_sc_pkg), then raise *_clear again.
// rc_i_pix are the currents of pixels (i,j), (i+1,j+1), (i+1,j), (i,j+1);
// g_i_x the gamma pixel current. rc_s / g_y are the time-encoded results,
// rc_v / g_v the analog results (1 V = value 1.0).
// ml_p[0..3] are the four PWM inputs of the AND chain (pairwise inharmonic
// periods), ml_y its product, high for a fraction prod(duty) of the common
// multiple of the periods. mx_p1, mx_p2 feed the AND, mx_p3a, mx_p3b the XOR
// (synchronized, same period), mx_p4 is the 50% select; mx_y is high for a
// fraction (duty1*duty2 + |duty3a - duty3b|) / 2 of the common multiple.
// These paths are combinational, with no delay.
module pwm_sc_top
  import pwm_sc_pkg::*;
(
  input  logic rc_en,
  input  logic rc_clear,
  output logic rc_frame,
  input  real  rc_i_pix [4],
  output logic rc_s,
  output real  rc_v,
  input  logic g_en,
  input  logic g_clear,
  output logic g_frame,
  input  real  g_i_x,
  output logic g_y,
  output real  g_v,
  input  logic [3:0] ml_p,
  output logic ml_y,
  input  logic mx_p1,
  input  logic mx_p2,
  input  logic mx_p3a,
  input  logic mx_p3b,
  input  logic mx_p4,
  output logic mx_y
);
  logic [3:0]              rc_pix;
  logic                    rc_sel;
  logic [GAMMA_DEGREE-1:0] g_x;
  logic [GAMMA_DEGREE:0]   g_b;
  logic [2:0]              g_sum;

  roberts_cross_pwm u_rc (
    .en(rc_en), .clear(rc_clear), .frame(rc_frame), .i_pix(rc_i_pix), .pix(rc_pix), .sel(rc_sel),
    .s_out(rc_s), .v_out(rc_v)
  );

  gamma_pwm u_gamma (
    .en(g_en), .clear(g_clear), .frame(g_frame), .i_x(g_i_x), .x(g_x), .b(g_b), .sum(g_sum),
    .y(g_y), .v_out(g_v)
  );

  multilevel_and_chain #(.N(4)) u_and_chain (.p(ml_p), .y(ml_y));

  multilevel_mixed u_mixed (
    .p1(mx_p1), .p2(mx_p2), .p3a(mx_p3a), .p3b(mx_p3b), .p4(mx_p4), .y(mx_y)
  );
endmodule
