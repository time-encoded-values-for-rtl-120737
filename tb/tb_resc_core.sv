`timescale 1ps/1fs
// tb_resc_core: checks the ReSC core (degree 6 and degree 3).
// 1) every x pattern with random coefficient bits: sum is the number of
//    ones in x and y equals coefficient bit number sum;
// 2) bit-stream evaluation of a degree-2 polynomial with independent streams:
//    x copies with periods 3 and 5 (value 1/3 and 2/5) and coefficients with
//    period 7, run for 105 ticks; ones must equal 105 * sum_k b_k P(sum=k).
module tb_resc_core;
  int checks = 0, failures = 0;
  logic [5:0] x;
  logic [6:0] b;
  logic [2:0] sum;
  logic       y;
  logic [1:0] x2;
  logic [2:0] b2;
  logic [1:0] sum2;
  logic       y2;

  resc_core dut (.x(x), .b(b), .sum(sum), .y(y));
  resc_core #(.DEGREE(2)) dut2 (.x(x2), .b(b2), .sum(sum2), .y(y2));

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
    int cnt, ones, expect_ones;
    int bk[3];
    for (int v = 0; v < 64; v++) begin
      for (int r = 0; r < 4; r++) begin
        x = 6'(v);
        b = 7'($urandom);
        #1;
        cnt = 0;
        for (int i = 0; i < 6; i++) cnt += v[i];
        check(int'(sum) == cnt, $sformatf("sum of %b", x));
        check(y == b[cnt], $sformatf("select x=%b b=%b", x, b));
      end
    end
    // x0: 1 of 3 high, x1: 2 of 5 high, b_k: bk[k] of 7 high.
    bk = '{1, 6, 3};
    ones = 0;
    for (int t = 0; t < 105; t++) begin
      x2[0] = (t % 3) >= 2;
      x2[1] = (t % 5) >= 3;
      for (int k = 0; k < 3; k++) b2[k] = (t % 7) >= 7 - bk[k];
      #1;
      ones += int'(y2);
    end
    // P(sum=0)=2/3*3/5, P(1)=1/3*3/5+2/3*2/5, P(2)=1/3*2/5 -> times 105:
    expect_ones = (42 * bk[0] + 49 * bk[1] + 14 * bk[2]) / 7;
    check(ones == expect_ones, $sformatf("degree-2 stream: %0d ones, expected %0d", ones, expect_ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
