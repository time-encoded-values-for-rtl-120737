`timescale 1ps/1fs
// tb_gmc_integrator: checks the output integrator (gain set for 1000 ps):
// an input high 300 ps of 1000 ps (in three pieces) must read 0.300 V; after
// clear and an input high 750 ps it must read 0.750 V; while clear is high
// it must read 0 V whatever the input; an always-high input reads 1.0 V.
module tb_gmc_integrator;
  int checks = 0, failures = 0;
  logic sig, clear;
  real  vout;

  gmc_integrator #(.T_OP_PS(1000.0)) dut (.sig(sig), .clear(clear), .vout(vout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (vout=%f)", what, vout); end
  endtask

  function automatic bit near(real a, real b, real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  initial begin
    #1us;
    #1us;
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sig = 0; clear = 1;
    #20;
    sig = 1; #30;
    check(near(vout, 0.0, 1e-9), "cleared");
    sig = 0; clear = 0;
    #100 sig = 1; #100 sig = 0;   // 100 ps
    #200 sig = 1; #150 sig = 0;   // 150 ps
    #400 sig = 1; #50 sig = 0;    // 50 ps, ends at 1000
    #0.01;
    check(near(vout, 0.3, 1e-4), "0.3 after 1000 ps");
    clear = 1; #10; clear = 0;
    sig = 1; #750 sig = 0; #250;
    #0.01;
    check(near(vout, 0.75, 1e-4), "0.75 after 1000 ps");
    clear = 1; #10; clear = 0;
    sig = 1; #1000;
    check(near(vout, 1.0, 0.0011), "always high");
    sig = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
