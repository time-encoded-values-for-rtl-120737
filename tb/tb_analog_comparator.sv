`timescale 1ps/1fs
// tb_analog_comparator: checks the comparator model, ideal and with a 10 mV
// input offset, on a sweep of the + input around a 0.5 V reference.
module tb_analog_comparator;
  int checks = 0, failures = 0;
  real  vp, vm;
  logic out, out_os;

  analog_comparator                 dut    (.v_plus(vp), .v_minus(vm), .out(out));
  analog_comparator #(.VOS_V(0.01)) dut_os (.v_plus(vp), .v_minus(vm), .out(out_os));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    vm = 0.5;
    for (int k = 0; k <= 100; k++) begin
      v = real'(k) / 100.0;
      vp = v;
      #1;
      check(out == (k > 50), $sformatf("ideal at %0.2f V", v));
      if (k != 51) check(out_os == (k > 51), $sformatf("offset at %0.2f V", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
