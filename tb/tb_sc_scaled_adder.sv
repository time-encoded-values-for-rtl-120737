`timescale 1ps/1fs
// tb_sc_scaled_adder: checks the MUX scaled adder.
// 1) truth table;
// 2) the 20 ns example: inputs 0.2 and 0.6 with a 5 ns period (high part at
//    the end of each period), select 0.5 with a 4 ns period; the output must
//    follow 00111001010000100011 (1 ns per bit), 8 ns high = 0.40;
// 3) random values on a 5-bit-period grid (odd input period 5 units x 51,
//    even select period 4 units x 51, run for 20 units): output ones must be
//    exactly (a + b) / 2 of the run.
// The same checks run on a second instance with SUBTRACT = 1, whose input 1
// is inverted: truth table, and on the grid exactly (a + (255 - b)) ones,
// i.e. the bipolar scaled difference (x0 - x1) / 2.
module tb_sc_scaled_adder;
  int checks = 0, failures = 0;
  logic in0, in1, sel, y, y_sub;

  sc_scaled_adder dut (.in0(in0), .in1(in1), .sel(sel), .y(y));
  sc_scaled_adder #(.SUBTRACT(1'b1)) dut_sub (.in0(in0), .in1(in1), .sel(sel), .y(y_sub));

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
    string expect_out;
    int ones, ones_sub, a, b;
    expect_out = "00111001010000100011";
    for (int v = 0; v < 8; v++) begin
      {sel, in1, in0} = 3'(v);
      #1;
      check(y == (v[2] ? v[1] : v[0]), $sformatf("truth table %b", v[2:0]));
      check(y_sub == (v[2] ? !v[1] : v[0]), $sformatf("subtractor truth table %b", v[2:0]));
    end
    ones = 0;
    for (int t = 0; t < 20; t++) begin
      in0 = (t % 5) >= 4;   // 0.2
      in1 = (t % 5) >= 2;   // 0.6
      sel = (t % 4) >= 2;   // 0.5
      #1;
      check(y == (expect_out[t] == "1"), $sformatf("example waveform at %0d ns", t));
      ones += int'(y);
    end
    check(ones == 8, $sformatf("example: %0d of 20 high, expected 8", ones));

    // Input period 255 ticks (odd), select period 170 ticks (even), 3:2.
    for (int n = 0; n < 40; n++) begin
      a = $urandom_range(0, 255);
      b = $urandom_range(0, 255);
      ones = 0;
      ones_sub = 0;
      for (int t = 0; t < 510; t++) begin
        in0 = (t % 255) >= 255 - a;
        in1 = (t % 255) >= 255 - b;
        sel = (t % 170) >= 85;
        #1;
        ones += int'(y);
        ones_sub += int'(y_sub);
      end
      check(ones_sub == a + (255 - b), $sformatf("scaled subtract a=%0d b=%0d ones=%0d", a, b, ones_sub));
      check(ones == a + b, $sformatf("scaled add a=%0d b=%0d ones=%0d", a, b, ones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
