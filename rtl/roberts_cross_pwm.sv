`timescale 1ps/1fs
// roberts_cross_pwm: BEHAVIOURAL MODEL (contains analog parts) of one pixel
// engine of the time-encoded Robert's cross edge detector.
//
// The four neighbouring pixel intensities arrive as sensing currents. One
// ring oscillator of PIX_STAGES inverters (about 0.51 ns period) resets all
// four PWM generators with the same pulse, so the four pixel signals are
// synchronized: same period, high part at the end of each period. The XOR
// gates of the core therefore compute exact absolute differences after one
// period. A second ring of SEL_STAGES inverters (about 0.34 ns) supplies the
// 50% multiplexer select directly as a clock. Pixel and select periods are
// close to a 3:2 ratio, so the average over their common multiple, T_OP_PS
// (two pixel periods, about 1 ns), is (|r_ij - r_i1j1| + |r_i1j - r_ij1|) / 2.
// A Gm-C integrator averages the core output over that time into v_out
// (volts, VDD = value 1).
//
// Interface: en runs both rings (free-running while high). i_pix[0..3] are
// the currents for r(i,j), r(i+1,j+1), r(i+1,j), r(i,j+1); a new current
// takes effect at the next pixel period. frame is the Reset pulse of the
// pixel generators (start of a pixel period). One operation: release clear
// at a rising edge of frame, read v_out T_OP_PS later, raise clear again.
// s_out is the time-encoded result; sel and pix are observation outputs.
module roberts_cross_pwm
  import pwm_sc_pkg::*;
#(
  parameter int  PIX_STAGES = RC_PIX_STAGES,
  parameter int  SEL_STAGES = RC_SEL_STAGES,
  parameter real T_OP_PS    = RC_T_OP_PS
) (
  input  logic       en,
  input  logic       clear,
  output logic       frame,
  input  real        i_pix [4],
  output logic [3:0] pix,
  output logic       sel,
  output logic       s_out,
  output real        v_out
);
  logic [PIX_STAGES-1:0] pix_stage, pix_pulse;
  logic [SEL_STAGES-1:0] sel_stage, sel_pulse;
  logic                  pix_clk;

  ring_oscillator #(.N_STAGES(PIX_STAGES), .T_INV_PS(T_INV_PS)) u_pix_ring (
    .en(en), .stage(pix_stage), .pulse(pix_pulse), .clk(pix_clk)
  );
  ring_oscillator #(.N_STAGES(SEL_STAGES), .T_INV_PS(T_INV_PS)) u_sel_ring (
    .en(en), .stage(sel_stage), .pulse(sel_pulse), .clk(sel)
  );

  for (genvar p = 0; p < 4; p++) begin : g_pix
    pwm_generator #(.C_F(C_RAMP_F), .VREF_V(VREF), .VDD_V(VDD)) u_gen (
      .i_in(i_pix[p]), .reset(pix_pulse[0]), .pwm(pix[p])
    );
  end

  roberts_cross_core u_core (
    .r_ij(pix[0]), .r_i1j1(pix[1]), .r_i1j(pix[2]), .r_ij1(pix[3]),
    .sel(sel), .s_ij(s_out)
  );

  assign frame = pix_pulse[0];

  gmc_integrator #(.T_OP_PS(T_OP_PS), .VDD_V(VDD)) u_int (
    .sig(s_out), .clear(clear | ~en), .vout(v_out)
  );
endmodule
