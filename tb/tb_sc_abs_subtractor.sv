`timescale 1ps/1fs
// tb_sc_abs_subtractor: checks the XOR absolute-value subtractor.
// 1) truth table;
// 2) correlated streams 11101 (4/5) and 10001 (2/5) give 01100 (2/5);
// 3) synchronized PWM operands 0.5 and 0.8 with a 20 ns period (high parts
//    at the end): output high 6 ns per period (0.3), over one period and
//    over five periods;
// 4) random synchronized values: ones per period equal |a - b| exactly.
module tb_sc_abs_subtractor;
  int checks = 0, failures = 0;
  logic a, b, y;

  sc_abs_subtractor dut (.a(a), .b(b), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string s1, s2, so;
    int ones, va, vb, expect_ones;
    s1 = "11101"; s2 = "10001"; so = "01100";
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check(y == (v == 1 || v == 2), $sformatf("truth table %b", v[1:0]));
    end
    for (int t = 0; t < 5; t++) begin
      a = (s1[t] == "1"); b = (s2[t] == "1");
      #1;
      check(y == (so[t] == "1"), $sformatf("correlated stream bit %0d", t));
    end
    ones = 0;
    for (int t = 0; t < 100; t++) begin
      a = (t % 20) >= 10;   // 0.5
      b = (t % 20) >= 4;    // 0.8
      #1;
      ones += int'(y);
      if (t == 19) check(ones == 6, $sformatf("first period: %0d ns high, expected 6", ones));
    end
    check(ones == 30, $sformatf("five periods: %0d ns high, expected 30", ones));
    for (int n = 0; n < 40; n++) begin
      va = $urandom_range(0, 255);
      vb = $urandom_range(0, 255);
      expect_ones = (va > vb) ? va - vb : vb - va;
      ones = 0;
      for (int t = 0; t < 255; t++) begin
        a = t >= 255 - va;
        b = t >= 255 - vb;
        #1;
        ones += int'(y);
      end
      check(ones == expect_ones, $sformatf("|%0d-%0d| gave %0d", va, vb, ones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
