`timescale 1ps/1fs
// tb_workload_period_error: tolerance of the two image-processing cores to
// clock generators that miss their period. The cores (roberts_cross_core and
// resc_core) are fed with ideal PWM waveforms (high part at the end of each
// period) at the periods of the default engines: 489.34 ps pixels and a
// 330.02 ps 50% select for Robert's cross, 603.14 ps x copies and 899.02 ps
// coefficients for gamma. Every clock generator gets its own random relative
// period error of up to 0%, 5%, 10% and 20%; all signals driven by the same
// ring share it, so the four pixel signals stay synchronized. The x copies
// keep the reset phases of their ring taps (tap k: k inverter delays after
// stage 0, plus half a period when k is odd), the select and coefficient
// phases are random as in the engines. The output high time is measured over
// the nominal operation time (978.68 ps / 1809.42 ps) and compared with the
// exact result; 50 random pixels per engine and rate. The mean error must
// stay below 1.5% (edge) and 3% (gamma) without period error and below 8% at
// 20%.
module tb_workload_period_error;
  import pwm_sc_pkg::*;
  int checks = 0, failures = 0;
  localparam int  NPIX  = 50;
  localparam real TPIX  = 2.0 * real'(RC_PIX_STAGES) * T_INV_PS;
  localparam real TSEL  = 2.0 * real'(RC_SEL_STAGES) * T_INV_PS;
  localparam real TX    = 2.0 * real'(GAMMA_X_STAGES) * T_INV_PS;
  localparam real TB    = 2.0 * real'(GAMMA_B_STAGES) * T_INV_PS;

  logic [3:0] pix;
  logic       sel, s_ij;
  logic [GAMMA_DEGREE-1:0] x;
  logic [GAMMA_DEGREE:0]   b;
  logic [2:0] sum;
  logic       y;

  roberts_cross_core u_rc (
    .r_ij(pix[0]), .r_i1j1(pix[1]), .r_i1j(pix[2]), .r_ij1(pix[3]), .sel(sel), .s_ij(s_ij)
  );
  resc_core #(.DEGREE(GAMMA_DEGREE)) u_resc (.x(x), .b(b), .sum(sum), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime rc_high, rc_rise, g_high, g_rise;
  always @(posedge s_ij) rc_rise = $realtime;
  always @(negedge s_ij) rc_high += $realtime - rc_rise;
  always @(posedge y) g_rise = $realtime;
  always @(negedge y) g_high += $realtime - g_rise;

  // Level of an ideal PWM waveform (period per, duty d, high part at the end
  // of every period, periods starting at times phase + n * per) at time t.
  function automatic logic level(real t, real per, real d, real phase);
    real pos;
    pos = t - phase;
    pos = pos - per * $floor(pos / per);
    return pos >= per * (1.0 - d);
  endfunction

  // Random relative error in [-rate, rate].
  function automatic real perr(real rate);
    return 1.0 + rate * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
  endfunction

  // Drive the waveforms in 0.05 ps steps for t_run; the cores are
  // combinational, so the measured high time is exact to the step size.
  localparam real STEP = 0.05;

  task automatic run_edge(input real d [4], input real rate, output real result);
    real tp, ts, ph_s;
    tp = TPIX * perr(rate);
    ts = TSEL * perr(rate);
    ph_s = ts * real'($urandom_range(0, 999)) / 1000.0;
    pix = '0; sel = 0;
    #1;
    rc_high = 0;
    for (real t = 0.0; t < RC_T_OP_PS; t += STEP) begin
      for (int k = 0; k < 4; k++) pix[k] = level(t, tp, d[k], 0.0);
      sel = level(t, ts, 0.5, ph_s);
      #(STEP);
    end
    pix = '0; sel = 0;
    #1;
    result = rc_high / RC_T_OP_PS;
  endtask

  task automatic run_gamma(input real dx, input real rate, output real result);
    real tx, tb, ph_b;
    real ph_x [GAMMA_DEGREE];
    tx = TX * perr(rate);
    tb = TB * perr(rate);
    ph_b = tb * real'($urandom_range(0, 999)) / 1000.0;
    for (int i = 0; i < GAMMA_DEGREE; i++)
      ph_x[i] = real'(GAMMA_X_TAPS[i]) * T_INV_PS + ((GAMMA_X_TAPS[i] % 2 == 1) ? tx / 2.0 : 0.0);
    x = '0; b = '0;
    #1;
    g_high = 0;
    for (real t = 0.0; t < GAMMA_T_OP_PS; t += STEP) begin
      for (int i = 0; i < GAMMA_DEGREE; i++) x[i] = level(t, tx, dx, ph_x[i]);
      for (int k = 0; k <= GAMMA_DEGREE; k++) b[k] = level(t, tb, BERN_COEF[k], ph_b);
      #(STEP);
    end
    x = '0; b = '0;
    #1;
    result = g_high / GAMMA_T_OP_PS;
  endtask

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    real rates [4];
    real d [4];
    real r, e, rc_err, g_err;
    int  p [4];
    rates = '{0.0, 0.05, 0.1, 0.2};
    pix = '0; sel = 0; x = '0; b = '0;
    rc_high = 0; g_high = 0; rc_rise = 0; g_rise = 0;
    foreach (rates[n]) begin
      rc_err = 0.0; g_err = 0.0;
      for (int i = 0; i < NPIX; i++) begin
        foreach (p[k]) begin p[k] = $urandom_range(0, 255); d[k] = real'(p[k]) / 255.0; end
        run_edge(d, rates[n], r);
        e = (absr(d[0] - d[1]) + absr(d[2] - d[3])) / 2.0;
        rc_err += absr(r - e);
        run_gamma(d[0], rates[n], r);
        g_err += absr(r - d[0] ** 0.45);
      end
      $display("period error up to %0.0f %%: edge mean error %0.3f %%, gamma mean error %0.3f %%",
               100.0 * rates[n], 100.0 * rc_err / NPIX, 100.0 * g_err / NPIX);
      if (n == 0) begin
        check(rc_err / NPIX < 0.015, "edge error without period error");
        check(g_err / NPIX < 0.03, "gamma error without period error");
      end else begin
        check(rc_err / NPIX < 0.08, $sformatf("edge error at %0.0f%% period error", 100.0 * rates[n]));
        check(g_err / NPIX < 0.08, $sformatf("gamma error at %0.0f%% period error", 100.0 * rates[n]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
