`timescale 1ps/1fs
// tb_workload_duty_error: tolerance of the two engines to inaccurate PWM
// generation. Each pixel's duty cycle is disturbed by a random relative
// error of up to 0%, 10% and 20% (uniform in +/-rate, clipped to [0,1])
// before it is turned into a sensing current; the outputs are compared with
// the exact, undisturbed results. Per rate, 16 random Robert's cross
// neighbourhoods and 16 random gamma pixels are processed by the top level.
// The mean error must stay below 1.5% / 3% without disturbance and below 8%
// at a 20% disturbance.
module tb_workload_duty_error;
  import pwm_sc_pkg::*;
  int checks = 0, failures = 0;
  localparam real TPIX = 2.0 * 43.0 * 5.69;
  localparam real TX   = 2.0 * 53.0 * 5.69;
  localparam int  NPIX = 16;

  logic rc_en, rc_clear, rc_frame, rc_s, g_en, g_clear, g_frame, g_y;
  real  rc_i_pix [4];
  real  rc_v, g_i_x, g_v;

  pwm_sc_top dut (
    .rc_en(rc_en), .rc_clear(rc_clear), .rc_frame(rc_frame), .rc_i_pix(rc_i_pix),
    .rc_s(rc_s), .rc_v(rc_v),
    .g_en(g_en), .g_clear(g_clear), .g_frame(g_frame), .g_i_x(g_i_x),
    .g_y(g_y), .g_v(g_v),
    .ml_p(4'b0000), .ml_y(), .mx_p1(1'b0), .mx_p2(1'b0), .mx_p3a(1'b0), .mx_p3b(1'b0),
    .mx_p4(1'b0), .mx_y()
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

  function automatic real disturb(int p, real rate);
    real d;
    d = real'(p) / 255.0 * (1.0 + rate * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0));
    if (d < 0.0) d = 0.0;
    if (d > 1.0) d = 1.0;
    return d;
  endfunction

  function automatic real current_for(real d, real period);
    if (d <= 0.0) return 0.0;
    if (period * (1.0 - d) - 5.69 < 0.01) return 5.0e-15 * 0.5 / 0.01e-12;
    return 5.0e-15 * 0.5 / ((period * (1.0 - d) - 5.69) * 1.0e-12);
  endfunction

  function automatic int absdiff(int x, int y);
    return (x > y) ? x - y : y - x;
  endfunction

  initial begin
    real rates[3];
    real rc_err, g_err;
    rates = '{0.0, 0.1, 0.2};
    rc_en = 0; g_en = 0; rc_clear = 1; g_clear = 1;
    foreach (rc_i_pix[k]) rc_i_pix[k] = 0.0;
    g_i_x = 0.0;
    #20;
    rc_en = 1; g_en = 1;
    foreach (rates[r]) begin
      rc_err = 0.0; g_err = 0.0;
      fork
        begin
          int p[4];
          real e;
          for (int n = 0; n < NPIX; n++) begin
            foreach (p[k]) p[k] = $urandom_range(0, 255);
            foreach (p[k]) rc_i_pix[k] = current_for(disturb(p[k], rates[r]), TPIX);
            repeat (2) @(posedge rc_frame);
            rc_clear = 0;
            #(RC_T_OP_PS);
            e = real'(absdiff(p[0], p[1]) + absdiff(p[2], p[3])) / 510.0;
            rc_err += (rc_v > e) ? rc_v - e : e - rc_v;
            rc_clear = 1;
          end
        end
        begin
          int p;
          real e;
          for (int n = 0; n < NPIX; n++) begin
            p = $urandom_range(0, 255);
            g_i_x = current_for(disturb(p, rates[r]), TX);
            repeat (2) @(posedge g_frame);
            g_clear = 0;
            #(GAMMA_T_OP_PS);
            e = (real'(p) / 255.0) ** 0.45;
            g_err += (g_v > e) ? g_v - e : e - g_v;
            g_clear = 1;
          end
        end
      join
      $display("duty error up to %0.0f %%: edge mean error %0.3f %%, gamma mean error %0.3f %%",
               100.0 * rates[r], 100.0 * rc_err / NPIX, 100.0 * g_err / NPIX);
      if (r == 0) begin
        check(rc_err / NPIX < 0.015, "edge error without disturbance");
        check(g_err / NPIX < 0.03, "gamma error without disturbance");
      end else begin
        check(rc_err / NPIX < 0.08, $sformatf("edge error at %0.0f%% disturbance", 100.0 * rates[r]));
        check(g_err / NPIX < 0.08, $sformatf("gamma error at %0.0f%% disturbance", 100.0 * rates[r]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
