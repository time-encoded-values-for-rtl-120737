`timescale 1ps/1fs
// tb_sc_multiplier: checks the AND (unipolar) and XNOR (bipolar) multipliers.
// 1) truth tables of both variants;
// 2) bit streams 11100 (3/5) and 1100 (1/2), repeated for 20 bits: the AND
//    output must be 11000100000010001100 with 6 ones (3/5 * 1/2 = 6/20);
// 3) continuous PWM operands 0.5 at 20 ns and 0.6 at 13 ns, run for their
//    common multiple of 260 ns: the output must be high for 78 ns (0.30).
module tb_sc_multiplier;
  int checks = 0, failures = 0;
  logic a, b, y_uni, y_bi;

  sc_multiplier                   dut_uni (.a(a), .b(b), .y(y_uni));
  sc_multiplier #(.BIPOLAR(1'b1)) dut_bi  (.a(a), .b(b), .y(y_bi));

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
    string xs, ys, expect_out;
    int ones;
    realtime t_high, t_rise;
    xs = "11100"; ys = "1100";
    expect_out = "11000100000010001100";

    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check(y_uni == (v == 3), $sformatf("AND truth table %b", v[1:0]));
      check(y_bi == (v == 0 || v == 3), $sformatf("XNOR truth table %b", v[1:0]));
    end

    ones = 0;
    for (int t = 0; t < 20; t++) begin
      a = (xs[t % 5] == "1");
      b = (ys[t % 4] == "1");
      #1;
      check(y_uni == (expect_out[t] == "1"), $sformatf("stream bit %0d", t));
      ones += int'(y_uni);
    end
    check(ones == 6, $sformatf("stream product ones=%0d expected 6", ones));

    // Continuous-time PWM operands (1 ns = 1000 ps).
    a = 0; b = 0;
    #1000;
    t_high = 0;
    fork
      begin : drive_a
        repeat (13) begin a = 0; #10000; a = 1; #10000; end
        a = 0;
      end
      begin : drive_b
        repeat (20) begin b = 0; #5200; b = 1; #7800; end
        b = 0;
      end
      begin : measure
        repeat (400) begin
          @(posedge y_uni); t_rise = $realtime;
          @(negedge y_uni); t_high += $realtime - t_rise;
        end
      end
    join_any
    #1;
    disable fork;
    $display("PWM product high time %0.3f ns of 260 ns", t_high / 1000.0);
    check(t_high > 77000 && t_high < 79000, "PWM product 0.5*0.6 = 78/260");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
