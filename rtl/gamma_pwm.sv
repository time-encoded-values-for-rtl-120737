`timescale 1ps/1fs
// gamma_pwm: BEHAVIOURAL MODEL (contains analog parts) of one pixel engine
// of the time-encoded gamma correction y = x^0.45.
//
// A degree-6 Bernstein polynomial is evaluated by the ReSC core. The core
// needs six roughly independent copies of the pixel value x. They are made by
// phase shifting rather than by different frequencies: one ring of X_STAGES
// inverters (about 0.60 ns period) provides Reset pulses at the rising edges
// of six different stages (X_TAPS), each resetting one PWM generator fed with
// the pixel current. The seven Bernstein coefficients are constant PWM
// signals of equal period from a second ring of B_STAGES inverters (about
// 0.90 ns); their generator currents are derived from the coefficient values
// at elaboration. Coefficient and x periods are close to a 3:2 ratio, so the
// result is complete after their common multiple, T_OP_PS (three x periods,
// about 1.8 ns). A Gm-C integrator averages the core output over that time
// into v_out.
//
// Interface: en runs both rings (free-running while high). i_x is the pixel
// current; a new current takes effect within one x period. frame is the Reset
// pulse of ring stage 0 of the x ring. One operation: release clear at a
// rising edge of frame, read v_out T_OP_PS later, raise clear again. x and b
// are the internal PWM signals, sum the core's adder output, y the
// time-encoded result.
module gamma_pwm
  import pwm_sc_pkg::*;
#(
  parameter int  X_STAGES = GAMMA_X_STAGES,
  parameter int  B_STAGES = GAMMA_B_STAGES,
  parameter real T_OP_PS  = GAMMA_T_OP_PS
) (
  input  logic                    en,
  input  logic                    clear,
  output logic                    frame,
  input  real                     i_x,
  output logic [GAMMA_DEGREE-1:0] x,
  output logic [GAMMA_DEGREE:0]   b,
  output logic [2:0]              sum,
  output logic                    y,
  output real                     v_out
);
  logic [X_STAGES-1:0] x_stage, x_pulse;
  logic [B_STAGES-1:0] b_stage, b_pulse;
  logic                x_clk, b_clk;

  ring_oscillator #(.N_STAGES(X_STAGES), .T_INV_PS(T_INV_PS)) u_x_ring (
    .en(en), .stage(x_stage), .pulse(x_pulse), .clk(x_clk)
  );
  ring_oscillator #(.N_STAGES(B_STAGES), .T_INV_PS(T_INV_PS)) u_b_ring (
    .en(en), .stage(b_stage), .pulse(b_pulse), .clk(b_clk)
  );

  for (genvar i = 0; i < GAMMA_DEGREE; i++) begin : g_x
    pwm_generator #(.C_F(C_RAMP_F), .VREF_V(VREF), .VDD_V(VDD)) u_gen (
      .i_in(i_x), .reset(x_pulse[GAMMA_X_TAPS[i] % X_STAGES]), .pwm(x[i])
    );
  end

  for (genvar k = 0; k <= GAMMA_DEGREE; k++) begin : g_b
    real i_coef;
    assign i_coef = pwm_current(BERN_COEF[k], ring_period_ps(B_STAGES), T_INV_PS);
    pwm_generator #(.C_F(C_RAMP_F), .VREF_V(VREF), .VDD_V(VDD)) u_gen (
      .i_in(i_coef), .reset(b_pulse[0]), .pwm(b[k])
    );
  end

  resc_core #(.DEGREE(GAMMA_DEGREE)) u_core (.x(x), .b(b), .sum(sum), .y(y));

  assign frame = x_pulse[0];

  gmc_integrator #(.T_OP_PS(T_OP_PS), .VDD_V(VDD)) u_int (
    .sig(y), .clear(clear | ~en), .vout(v_out)
  );
endmodule
