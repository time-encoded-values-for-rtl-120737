`timescale 1ps/1fs
// tb_gamma_pwm: runs the gamma-correction pixel engine on pixel values 0..255
// (a sweep plus random values). Each value x = p/255 becomes the sensing
// current that gives duty cycle x with the 53-stage ring period; the engine
// runs for 1.8 ns and the integrator voltage is compared with x^0.45. The
// mean error must stay below 3% and every result within 10%. The test also
// checks that the adder of the core visits at least five of its seven
// values, i.e. that the six phase-shifted copies of x are not aligned.
module tb_gamma_pwm;
  int checks = 0, failures = 0;
  localparam real TINV = 5.69;
  localparam real TX   = 2.0 * 53.0 * TINV;
  localparam int  NPIX = 30;
  localparam real T_OP = 3.0 * TX;
  logic       en, clear, frame, y;
  logic [5:0] x;
  logic [6:0] b;
  logic [2:0] sum;
  real        i_x, v_out;

  gamma_pwm dut (.en(en), .clear(clear), .frame(frame), .i_x(i_x), .x(x), .b(b), .sum(sum), .y(y), .v_out(v_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real current_for(int p);
    real d;
    d = real'(p) / 255.0;
    if (d <= 0.0) return 0.0;
    if (TX * (1.0 - d) - TINV < 0.01) return 5.0e-15 * 0.5 / 0.01e-12;
    return 5.0e-15 * 0.5 / ((TX * (1.0 - d) - TINV) * 1.0e-12);
  endfunction

  initial begin
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [6:0] sums_seen = '0;
  always @(sum) if (!clear) sums_seen[sum] = 1'b1;

  initial begin
    int p;
    real expect_v, err, sum_err;
    en = 0; clear = 1; i_x = 0.0; sum_err = 0.0;
    #20 en = 1;
    for (int n = 0; n < NPIX; n++) begin
      p = (n < 18) ? n * 15 : $urandom_range(0, 255);
      i_x = current_for(p);
      repeat (3) @(posedge frame);
      clear = 0;
      #(T_OP);
      expect_v = (real'(p) / 255.0) ** 0.45;
      err = (v_out > expect_v) ? v_out - expect_v : expect_v - v_out;
      sum_err += err;
      $display("pixel %3d  expected %0.4f  got %0.4f", p, expect_v, v_out);
      check(err < 0.10, $sformatf("pixel %0d error %0.4f", p, err));
      clear = 1;
    end
    $display("mean error %0.3f %%, adder values seen %b", 100.0 * sum_err / NPIX, sums_seen);
    check(sum_err / NPIX < 0.03, "mean error below 3%");
    check($countones(sums_seen) >= 5, "adder visits at least five values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
