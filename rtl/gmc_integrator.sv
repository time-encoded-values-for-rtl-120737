`timescale 1ps/1fs
// gmc_integrator: BEHAVIOURAL MODEL (not synthesizable) of the active
// (Gm-C) integrator that converts a time-encoded output signal back into an
// analog value.
//
// While clear is low the integrator accumulates the time its input is high;
// its gain is set so that after exactly T_OP_PS of operation the output
// voltage is VDD_V times the fraction of that time the input was high. The
// accumulated high time is exact (updated at every edge); the output voltage
// is refreshed at every edge and every STEP_PS. clear high empties it.
//
// Interface: sig the stochastic output signal, clear resets the integrator,
// vout the output voltage. Read vout T_OP_PS after clear falls.
module gmc_integrator #(
  parameter real T_OP_PS = 1020.0,
  parameter real VDD_V   = 1.0,
  parameter real STEP_PS = 1.0
) (
  input  logic sig,
  input  logic clear,
  output real  vout
);
  real     acc_ps;
  realtime t_mark;
  logic    high_q;

  initial begin
    acc_ps = 0.0;
    t_mark = 0.0;
    high_q = 1'b0;
    vout   = 0.0;
  end

  function automatic real level(real acc, realtime since, logic h);
    return VDD_V * (acc + (h ? real'($realtime - since) : 0.0)) / T_OP_PS;
  endfunction

  always @(sig or clear) begin
    if (clear) acc_ps = 0.0;
    else if (high_q) acc_ps = acc_ps + real'($realtime - t_mark);
    t_mark = $realtime;
    high_q = sig & ~clear;
    vout   = level(acc_ps, t_mark, high_q);
  end

  always begin
    #(STEP_PS);
    vout = level(acc_ps, t_mark, high_q);
  end
endmodule
