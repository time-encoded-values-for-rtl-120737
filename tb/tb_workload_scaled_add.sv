`timescale 1ps/1fs
// tb_workload_scaled_add: the PWM scaled-addition experiment. 1000 pairs of
// random values are encoded as continuous PWM signals with the same odd
// period (5 ns, high part at the end), the select is a 50% clock with an even
// period (4 ns), and the MUX runs for the 20 ns common multiple. The output
// high fraction must match (x0 + x1)/2 with a mean error below 0.5%. For
// contrast, 200 pairs with an even input period (4 ns) and an odd select
// period (3 ns), run for their 12 ns common multiple, must give a clearly
// larger mean error, as the odd/even rule predicts.
module tb_workload_scaled_add;
  int checks = 0, failures = 0;
  logic in0, in1, sel, y;
  realtime t_high, t_rise;

  sc_scaled_adder dut (.in0(in0), .in1(in1), .sel(sel), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge y) t_rise = $realtime;
  always @(negedge y) t_high += $realtime - t_rise;

  task automatic add(input real p_in, input real p_sel, input real d0, input real d1,
                     input real t_run, output real result);
    in0 = 0; in1 = 0; sel = 0;
    #10;
    t_high = 0.0;
    fork
      forever begin in0 = (d0 >= 1.0); #(p_in * (1.0 - d0)); in0 = (d0 > 0.0); #(p_in * d0); end
      forever begin in1 = (d1 >= 1.0); #(p_in * (1.0 - d1)); in1 = (d1 > 0.0); #(p_in * d1); end
      forever begin sel = 0; #(p_sel / 2.0); sel = 1; #(p_sel / 2.0); end
      #(t_run);
    join_any
    disable fork;
    in0 = 0; in1 = 0; sel = 0;
    #1;
    result = t_high / t_run;
  endtask

  initial begin
    real d0, d1, r, err, sum_err, sum_err_e;
    sum_err = 0.0;
    for (int n = 0; n < 1000; n++) begin
      d0 = real'($urandom_range(0, 1000)) / 1000.0;
      d1 = real'($urandom_range(0, 1000)) / 1000.0;
      add(5000.0, 4000.0, d0, d1, 20000.0, r);
      err = (r > (d0 + d1) / 2.0) ? r - (d0 + d1) / 2.0 : (d0 + d1) / 2.0 - r;
      sum_err += err;
      check(err < 0.02, $sformatf("(%0.3f + %0.3f)/2 gave %0.4f", d0, d1, r));
    end
    $display("odd 5 ns inputs, even 4 ns select: mean error %0.3f %%", 100.0 * sum_err / 1000.0);
    check(sum_err / 1000.0 < 0.005, "mean error below 0.5% with odd inputs and even select");
    sum_err_e = 0.0;
    for (int n = 0; n < 200; n++) begin
      d0 = real'($urandom_range(0, 1000)) / 1000.0;
      d1 = real'($urandom_range(0, 1000)) / 1000.0;
      add(4000.0, 3000.0, d0, d1, 12000.0, r);
      sum_err_e += (r > (d0 + d1) / 2.0) ? r - (d0 + d1) / 2.0 : (d0 + d1) / 2.0 - r;
    end
    $display("even 4 ns inputs, odd 3 ns select: mean error %0.3f %%", 100.0 * sum_err_e / 200.0);
    check(sum_err_e / 200.0 > 2.0 * sum_err / 1000.0, "even inputs with odd select are worse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
