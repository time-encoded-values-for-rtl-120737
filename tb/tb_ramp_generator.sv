`timescale 1ps/1fs
// tb_ramp_generator: checks the capacitor ramp model. 1 uA into 5 fF must
// rise at 0.2 mV/ps: 0.1 V after 500 ps, 0.2 V after 1000 ps; a reset pulse
// must bring it to 0 V; a large current must saturate it at 1 V; zero current
// must keep it at 0 V.
module tb_ramp_generator;
  int checks = 0, failures = 0;
  real  i_in, v;
  logic rst;

  ramp_generator dut (.i_in(i_in), .rst(rst), .v_ramp(v));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (v=%f)", what, v); end
  endtask

  function automatic bit near(real a, real b, real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  initial begin
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_in = 0.0; rst = 1;
    #10;
    check(near(v, 0.0, 1e-9), "held at 0 during reset");
    i_in = 1.0e-6; rst = 0;
    #500;
    check(near(v, 0.1, 0.001), "0.1 V after 500 ps at 1 uA");
    #500;
    check(near(v, 0.2, 0.001), "0.2 V after 1000 ps at 1 uA");
    rst = 1; #6; rst = 0;
    check(v < 0.002, "discharged by reset");
    i_in = 100.0e-6;
    #200;
    check(near(v, 1.0, 1e-9), "saturates at supply");
    rst = 1; #6; rst = 0; i_in = 0.0;
    #300;
    check(near(v, 0.0, 1e-9), "no current, no ramp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
