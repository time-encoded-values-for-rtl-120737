`timescale 1ps/1fs
// tb_roberts_cross_core: checks the Robert's cross core logic.
// 1) all 32 input combinations against mux(sel, r_ij^r_i1j1, r_i1j^r_ij1);
// 2) random pixel quadruples as synchronized discretized PWM signals with a
//    255-tick period and a 50% select with a 170-tick period (3:2 ratio),
//    run for 510 ticks: output ones must equal |a-b| + |c-d| exactly, i.e.
//    the value (|a-b| + |c-d|)/2 / 255.
module tb_roberts_cross_core;
  int checks = 0, failures = 0;
  logic [3:0] r;
  logic sel, s;

  roberts_cross_core dut (.r_ij(r[0]), .r_i1j1(r[1]), .r_i1j(r[2]), .r_ij1(r[3]),
                          .sel(sel), .s_ij(s));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int absdiff(int x, int y);
    return (x > y) ? x - y : y - x;
  endfunction

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p[4];
    int ones, expect_ones;
    for (int v = 0; v < 32; v++) begin
      {sel, r} = 5'(v);
      #1;
      check(s == (sel ? (r[2] ^ r[3]) : (r[0] ^ r[1])), $sformatf("truth table %b", v[4:0]));
    end
    for (int n = 0; n < 60; n++) begin
      foreach (p[i]) p[i] = $urandom_range(0, 255);
      expect_ones = absdiff(p[0], p[1]) + absdiff(p[2], p[3]);
      ones = 0;
      for (int t = 0; t < 510; t++) begin
        for (int i = 0; i < 4; i++) r[i] = (t % 255) >= 255 - p[i];
        sel = (t % 170) >= 85;
        #1;
        ones += int'(s);
      end
      check(ones == expect_ones, $sformatf("pixels %0d %0d %0d %0d: %0d ones, expected %0d",
                                           p[0], p[1], p[2], p[3], ones, expect_ones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
