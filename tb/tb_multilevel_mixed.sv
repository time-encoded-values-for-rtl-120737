`timescale 1ps/1fs
// tb_multilevel_mixed: checks the AND/XOR/MUX two-level circuit.
// 1) all 32 input combinations;
// 2) P1 = 3, P2 = 5 (AND output period 15), P3 = 15 (synchronized XOR
//    inputs, odd), P4 = 2 (50% select, even): after P3 * P4 = 30 ticks the
//    output ones must equal a1*a2 + |c-d| exactly.
module tb_multilevel_mixed;
  int checks = 0, failures = 0;
  logic p1, p2, p3a, p3b, p4, y;

  multilevel_mixed dut (.p1(p1), .p2(p2), .p3a(p3a), .p3b(p3b), .p4(p4), .y(y));

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
    int a1, a2, c, d, ones, expect_ones;
    for (int v = 0; v < 32; v++) begin
      {p4, p3b, p3a, p2, p1} = 5'(v);
      #1;
      check(y == (p4 ? (p3a ^ p3b) : (p1 & p2)), $sformatf("truth table %b", v[4:0]));
    end
    for (int n = 0; n < 60; n++) begin
      a1 = $urandom_range(0, 3);
      a2 = $urandom_range(0, 5);
      c  = $urandom_range(0, 15);
      d  = $urandom_range(0, 15);
      expect_ones = a1 * a2 + ((c > d) ? c - d : d - c);
      ones = 0;
      for (int t = 0; t < 30; t++) begin
        p1  = (t % 3) >= 3 - a1;
        p2  = (t % 5) >= 5 - a2;
        p3a = (t % 15) >= 15 - c;
        p3b = (t % 15) >= 15 - d;
        p4  = (t % 2) >= 1;
        #1;
        ones += int'(y);
      end
      check(ones == expect_ones, $sformatf("a1=%0d a2=%0d c=%0d d=%0d: %0d ones, expected %0d",
                                           a1, a2, c, d, ones, expect_ones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
