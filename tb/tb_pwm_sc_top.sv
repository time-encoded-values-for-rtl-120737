`timescale 1ps/1fs
// tb_pwm_sc_top: end-to-end run of both engines of the top level, with all
// parameters at their defaults, on a generated 8x8 test image (a diagonal
// intensity ramp with a bright 4x4 square, so it has flat areas and edges).
// The Robert's cross engine processes all 49 2x2 neighbourhoods and the gamma
// engine all 64 pixels, concurrently. Each pixel value p becomes the sensing
// current giving duty cycle p/255 at the engine's pixel-ring period. The
// output images are compared with the exact results (edge value
// (|a-b| + |c-d|)/2 and (p/255)^0.45) using the average error rate
// E = sum |T - S| / (255 * pixels) * 100. E must stay below 1.5% (edges) and
// 3% (gamma), every pixel within 5% / 10% of full scale.
// Mechanisms counted (each must occur): both XOR absolute differences
// active, both multiplexer select values, every adder value 0..6 of the ReSC
// core, each Bernstein coefficient selected while high, and one integrator
// readout per pixel.
// Afterwards, with the engines stopped, the two multi-level gate examples
// get random input sets as ideal PWM waveforms: 4 sets for the AND chain with
// pairwise coprime periods of 70/110/130/90 ps (7/11/13/9 units of 10 ps;
// only the ratios matter for ideal gates) run for their 9.009 ns common
// multiple (within 1.5% of the product), 8 sets for the mixed circuit with
// AND inputs of 0.3 and 0.5 ns, XOR inputs of 1.5 ns (the AND output period,
// odd in units of 0.1 ns) and an even 0.2 ns select, run for 3 ns (within
// 2%). Counted: every level of the
// AND chain going high, and the MUX passing the AND and the XOR result.
module tb_pwm_sc_top;
  import pwm_sc_pkg::*;
  int checks = 0, failures = 0;
  localparam int  W = 8;
  localparam real TPIX = 2.0 * 43.0 * 5.69;
  localparam real TX   = 2.0 * 53.0 * 5.69;

  logic rc_en, rc_clear, rc_frame, rc_s, g_en, g_clear, g_frame, g_y;
  real  rc_i_pix [4];
  real  rc_v, g_i_x, g_v;
  logic [3:0] ml_p;
  logic ml_y, mx_p1, mx_p2, mx_p3a, mx_p3b, mx_p4, mx_y;

  pwm_sc_top dut (
    .rc_en(rc_en), .rc_clear(rc_clear), .rc_frame(rc_frame), .rc_i_pix(rc_i_pix),
    .rc_s(rc_s), .rc_v(rc_v),
    .g_en(g_en), .g_clear(g_clear), .g_frame(g_frame), .g_i_x(g_i_x),
    .g_y(g_y), .g_v(g_v),
    .ml_p(ml_p), .ml_y(ml_y),
    .mx_p1(mx_p1), .mx_p2(mx_p2), .mx_p3a(mx_p3a), .mx_p3b(mx_p3b), .mx_p4(mx_p4), .mx_y(mx_y)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real current_for(int p, real period);
    real d;
    d = real'(p) / 255.0;
    if (d <= 0.0) return 0.0;
    if (period * (1.0 - d) - 5.69 < 0.01) return 5.0e-15 * 0.5 / 0.01e-12;
    return 5.0e-15 * 0.5 / ((period * (1.0 - d) - 5.69) * 1.0e-12);
  endfunction

  function automatic int absdiff(int x, int y);
    return (x > y) ? x - y : y - x;
  endfunction

  int img [W][W];

  // Mechanism counters.
  int n_diag_main = 0, n_diag_anti = 0, n_sel_hi = 0, n_sel_lo = 0;
  int n_rc_read = 0, n_g_read = 0;
  int n_sum [7];
  int n_coef [7];
  always @(posedge dut.u_rc.u_core.diag_main) if (!rc_clear) n_diag_main++;
  always @(posedge dut.u_rc.u_core.diag_anti) if (!rc_clear) n_diag_anti++;
  always @(posedge dut.u_rc.sel) if (!rc_clear) n_sel_hi++;
  always @(negedge dut.u_rc.sel) if (!rc_clear) n_sel_lo++;
  always @(dut.u_gamma.sum or dut.u_gamma.b)
    if (!g_clear) begin
      n_sum[dut.u_gamma.sum]++;
      if (dut.u_gamma.b[dut.u_gamma.sum]) n_coef[dut.u_gamma.sum]++;
    end

  real rc_err_sum = 0.0, g_err_sum = 0.0;

  // Multi-level examples: output high time, level activity, MUX paths.
  realtime ml_high = 0, ml_rise = 0, mx_high = 0, mx_rise = 0;
  int n_level [4];
  int n_mx_prod = 0, n_mx_diff = 0;
  always @(posedge ml_y) ml_rise = $realtime;
  always @(negedge ml_y) ml_high += $realtime - ml_rise;
  always @(posedge mx_y) mx_rise = $realtime;
  always @(negedge mx_y) mx_high += $realtime - mx_rise;
  always @(posedge dut.u_and_chain.level[1]) n_level[1]++;
  always @(posedge dut.u_and_chain.level[2]) n_level[2]++;
  always @(posedge dut.u_and_chain.level[3]) n_level[3]++;
  always @(posedge mx_y) if (mx_p4) n_mx_diff++; else n_mx_prod++;

  // An ideal PWM waveform: period per_ps, duty d, high part at the end.
  task automatic wave(ref logic s, input real per_ps, input real d, input real t_run);
    realtime t_end;
    t_end = $realtime + t_run;
    while ($realtime < t_end - 0.001) begin
      s = (d >= 1.0); #(per_ps * (1.0 - d));
      s = (d > 0.0);  #(per_ps * d);
    end
    s = 0;
  endtask

  task automatic wave_bit(input int k, input real per_ps, input real d, input real t_run);
    realtime t_end;
    t_end = $realtime + t_run;
    while ($realtime < t_end - 0.001) begin
      ml_p[k] = (d >= 1.0); #(per_ps * (1.0 - d));
      ml_p[k] = (d > 0.0);  #(per_ps * d);
    end
    ml_p[k] = 0;
  endtask

  initial begin
    foreach (n_sum[k]) begin n_sum[k] = 0; n_coef[k] = 0; end
    foreach (n_level[k]) n_level[k] = 0;
    ml_p = '0; mx_p1 = 0; mx_p2 = 0; mx_p3a = 0; mx_p3b = 0; mx_p4 = 0;
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++)
        img[i][j] = (i >= 2 && i < 6 && j >= 2 && j < 6) ? 240 : 16 * (i + j) + 8;
    rc_en = 0; g_en = 0; rc_clear = 1; g_clear = 1;
    foreach (rc_i_pix[k]) rc_i_pix[k] = 0.0;
    g_i_x = 0.0;
    #20;
    rc_en = 1; g_en = 1;
    fork
      begin : edge_engine
        int a, b, c, d;
        real expect_v, err;
        for (int i = 0; i < W - 1; i++)
          for (int j = 0; j < W - 1; j++) begin
            a = img[i][j]; b = img[i+1][j+1]; c = img[i+1][j]; d = img[i][j+1];
            rc_i_pix[0] = current_for(a, TPIX);
            rc_i_pix[1] = current_for(b, TPIX);
            rc_i_pix[2] = current_for(c, TPIX);
            rc_i_pix[3] = current_for(d, TPIX);
            repeat (2) @(posedge rc_frame);
            rc_clear = 0;
            #(RC_T_OP_PS);
            n_rc_read++;
            expect_v = real'(absdiff(a, b) + absdiff(c, d)) / 2.0 / 255.0;
            err = (rc_v > expect_v) ? rc_v - expect_v : expect_v - rc_v;
            rc_err_sum += err;
            check(err < 0.05, $sformatf("edge (%0d,%0d): %0.4f expected %0.4f", i, j, rc_v, expect_v));
            rc_clear = 1;
          end
      end
      begin : gamma_engine
        real expect_v, err;
        for (int i = 0; i < W; i++)
          for (int j = 0; j < W; j++) begin
            g_i_x = current_for(img[i][j], TX);
            repeat (2) @(posedge g_frame);
            g_clear = 0;
            #(GAMMA_T_OP_PS);
            n_g_read++;
            expect_v = (real'(img[i][j]) / 255.0) ** 0.45;
            err = (g_v > expect_v) ? g_v - expect_v : expect_v - g_v;
            g_err_sum += err;
            check(err < 0.10, $sformatf("gamma (%0d,%0d) p=%0d: %0.4f expected %0.4f", i, j, img[i][j], g_v, expect_v));
            g_clear = 1;
          end
      end
    join
    rc_en = 0; g_en = 0;
    foreach (rc_i_pix[k]) rc_i_pix[k] = 0.0;
    g_i_x = 0.0;
    begin : multilevel
      real d [5];
      real expect_v, meas;
      for (int n = 0; n < 4; n++) begin
        foreach (d[k]) d[k] = real'($urandom_range(200, 1000)) / 1000.0;
        ml_high = 0;
        fork
          wave_bit(0, 70.0, d[0], 9009.0);
          wave_bit(1, 110.0, d[1], 9009.0);
          wave_bit(2, 130.0, d[2], 9009.0);
          wave_bit(3, 90.0, d[3], 9009.0);
        join
        #1;
        meas = ml_high / 9009.0;
        expect_v = d[0] * d[1] * d[2] * d[3];
        check((meas > expect_v ? meas - expect_v : expect_v - meas) < 0.015,
              $sformatf("AND chain set %0d: %0.4f expected %0.4f", n, meas, expect_v));
      end
      for (int n = 0; n < 8; n++) begin
        foreach (d[k]) d[k] = real'($urandom_range(0, 1000)) / 1000.0;
        mx_high = 0;
        fork
          wave(mx_p1, 300.0, d[0], 3000.0);
          wave(mx_p2, 500.0, d[1], 3000.0);
          wave(mx_p3a, 1500.0, d[2], 3000.0);
          wave(mx_p3b, 1500.0, d[3], 3000.0);
          wave(mx_p4, 200.0, 0.5, 3000.0);
        join
        #1;
        meas = mx_high / 3000.0;
        expect_v = 0.5 * (d[0] * d[1] + (d[2] > d[3] ? d[2] - d[3] : d[3] - d[2]));
        check((meas > expect_v ? meas - expect_v : expect_v - meas) < 0.02,
              $sformatf("mixed circuit set %0d: %0.4f expected %0.4f", n, meas, expect_v));
      end
    end
    $display("edge image error E = %0.3f %%", 100.0 * rc_err_sum / ((W - 1) * (W - 1)));
    $display("gamma image error E = %0.3f %%", 100.0 * g_err_sum / (W * W));
    check(100.0 * rc_err_sum / ((W - 1) * (W - 1)) < 1.5, "edge image error below 1.5%");
    check(100.0 * g_err_sum / (W * W) < 3.0, "gamma image error below 3%");
    $display("mechanisms: main-diagonal XOR pulses %0d, anti-diagonal XOR pulses %0d, select high %0d low %0d",
             n_diag_main, n_diag_anti, n_sel_hi, n_sel_lo);
    $display("            integrator readouts edge %0d gamma %0d", n_rc_read, n_g_read);
    for (int k = 0; k < 7; k++)
      $display("            ReSC adder value %0d: %0d times, coefficient b%0d passed %0d times", k, n_sum[k], k, n_coef[k]);
    $display("            AND chain levels high %0d %0d %0d, mixed MUX passed AND %0d XOR %0d",
             n_level[1], n_level[2], n_level[3], n_mx_prod, n_mx_diff);
    for (int k = 1; k < 4; k++) check(n_level[k] > 0, $sformatf("AND chain level %0d went high", k));
    check(n_mx_prod > 0 && n_mx_diff > 0, "mixed circuit passed both MUX inputs");
    check(n_diag_main > 0, "main-diagonal absolute difference occurred");
    check(n_diag_anti > 0, "anti-diagonal absolute difference occurred");
    check(n_sel_hi > 0 && n_sel_lo > 0, "both select values occurred");
    check(n_rc_read == (W - 1) * (W - 1) && n_g_read == W * W, "one readout per pixel");
    for (int k = 0; k < 7; k++) begin
      check(n_sum[k] > 0, $sformatf("adder value %0d occurred", k));
      check(n_coef[k] > 0, $sformatf("coefficient b%0d selected while high", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
