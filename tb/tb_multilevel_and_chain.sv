`timescale 1ps/1fs
// tb_multilevel_and_chain: checks the four-input AND chain.
// 1) all 16 input combinations;
// 2) four periodic streams with pairwise relatively prime periods 2, 3, 5, 7
//    and random numbers of ones a_i, run for 210 ticks (the product of the
//    periods): output ones must equal a_0 * a_1 * a_2 * a_3 exactly;
// 3) the same with periods 2, 4, 5, 7 (two harmonically related inputs):
//    for a_0 = 1, a_1 = 2 with aligned streams the product is wrong, which
//    shows why related periods must be avoided.
module tb_multilevel_and_chain;
  int checks = 0, failures = 0;
  logic [3:0] p;
  logic y;

  multilevel_and_chain dut (.p(p), .y(y));

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
    int per[4], a[4];
    int ones;
    per = '{2, 3, 5, 7};
    for (int v = 0; v < 16; v++) begin
      p = 4'(v);
      #1;
      check(y == (v == 15), $sformatf("truth table %b", p));
    end
    for (int n = 0; n < 50; n++) begin
      for (int i = 0; i < 4; i++) a[i] = $urandom_range(0, per[i]);
      ones = 0;
      for (int t = 0; t < 210; t++) begin
        for (int i = 0; i < 4; i++) p[i] = (t % per[i]) >= per[i] - a[i];
        #1;
        ones += int'(y);
      end
      check(ones == a[0] * a[1] * a[2] * a[3],
            $sformatf("product %0d*%0d*%0d*%0d gave %0d", a[0], a[1], a[2], a[3], ones));
    end
    // Harmonic pair: period 2 value 1/2 and period 4 value 2/4, both high at
    // the end: they overlap fully, so the chain sees 1/2, not 1/4.
    ones = 0;
    for (int t = 0; t < 280; t++) begin
      p[0] = (t % 2) >= 1;
      p[1] = (t % 4) >= 2;
      p[2] = 1'b1;
      p[3] = 1'b1;
      #1;
      ones += int'(y);
    end
    check(ones == 70, $sformatf("harmonic inputs: %0d ones, expected 70", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
