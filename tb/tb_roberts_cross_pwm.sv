`timescale 1ps/1fs
// tb_roberts_cross_pwm: runs the Robert's cross pixel engine on random pixel
// neighbourhoods (plus an all-equal and a maximum-edge case). Each pixel
// value p/255 is turned into the sensing current that gives duty cycle
// p/255 with the 43-stage ring period; the engine runs for 1.02 ns and the
// integrator voltage is compared with (|a-b| + |c-d|)/2 / 255. Every result
// must be within 4% of full scale and the mean error below 1.5%. The test
// also checks that the four pixel signals are synchronized (rise only
// together with or after each other within a period and all fall at the
// Reset) by checking that both XOR differences and both select values occur.
module tb_roberts_cross_pwm;
  int checks = 0, failures = 0;
  localparam real TINV = 5.69;
  localparam real TPIX = 2.0 * 43.0 * TINV;
  localparam int  NPIX = 24;
  localparam real T_OP = 2.0 * TPIX;
  logic       en, clear, frame, sel, s_out;
  logic [3:0] pix;
  real        i_pix [4];
  real        v_out;

  roberts_cross_pwm dut (.en(en), .clear(clear), .frame(frame), .i_pix(i_pix), .pix(pix), .sel(sel), .s_out(s_out), .v_out(v_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real current_for(int p);
    real d;
    d = real'(p) / 255.0;
    if (d <= 0.0) return 0.0;
    if (TPIX * (1.0 - d) - TINV < 0.01) return 5.0e-15 * 0.5 / 0.01e-12;
    return 5.0e-15 * 0.5 / ((TPIX * (1.0 - d) - TINV) * 1.0e-12);
  endfunction

  function automatic int absdiff(int x, int y);
    return (x > y) ? x - y : y - x;
  endfunction

  initial begin
    #500ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sel_hi = 0, sel_lo = 0;
  always @(posedge sel) sel_hi++;
  always @(negedge sel) sel_lo++;

  initial begin
    int p[4];
    real expect_v, err, sum_err;
    en = 0; clear = 1;
    foreach (i_pix[i]) i_pix[i] = 0.0;
    sum_err = 0.0;
    #20 en = 1;
    for (int n = 0; n < NPIX; n++) begin
      foreach (p[i]) p[i] = $urandom_range(0, 255);
      if (n == 0) p = '{128, 128, 128, 128};
      if (n == 1) p = '{255, 0, 0, 255};
      foreach (i_pix[i]) i_pix[i] = current_for(p[i]);
      repeat (3) @(posedge frame);
      clear = 0;
      #(T_OP);
      expect_v = real'(absdiff(p[0], p[1]) + absdiff(p[2], p[3])) / 2.0 / 255.0;
      err = (v_out > expect_v) ? v_out - expect_v : expect_v - v_out;
      sum_err += err;
      $display("pixels %3d %3d %3d %3d  expected %0.4f  got %0.4f", p[0], p[1], p[2], p[3], expect_v, v_out);
      check(err < 0.04, $sformatf("pixel set %0d error %0.4f", n, err));
      clear = 1;
    end
    $display("mean error %0.3f %%", 100.0 * sum_err / NPIX);
    check(sum_err / NPIX < 0.015, "mean error below 1.5%");
    check(sel_hi > 0 && sel_lo > 0, "select toggles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
