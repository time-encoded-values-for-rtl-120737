`timescale 1ps/1fs
// tb_ring_oscillator: checks the inverter-ring clock generator model.
// With 89 stages of 5.69 ps the period must be 2*89*5.69 = 1012.82 ps
// (about 1 ns), 50% duty; stage 2 must lag stage 0 by two inverter delays,
// stage 1 be its inverse delayed by one; the Reset pulse must be one
// inverter delay wide at every rising edge of stage 0; pulse[1] must start
// half a period plus one inverter delay after pulse[0]; the ring must stop
// when disabled.
module tb_ring_oscillator;
  int checks = 0, failures = 0;
  localparam int  N = 89;
  localparam real TINV = 5.69;
  logic en, clk;
  logic [N-1:0] stage, pulse;

  ring_oscillator dut (.en(en), .stage(stage), .pulse(pulse), .clk(clk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
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
    realtime t_en, r0, r1, f0, s2, p0s, p0e, p1s;
    int edges;
    en = 0;
    #100;
    check(clk == 1'b0 && stage[1] == 1'b1, "rest state");
    en = 1; t_en = $realtime;
    @(posedge clk); r0 = $realtime;
    check(near(r0 - t_en, 0.0, 0.01), "stage 0 rises on enable");
    @(posedge stage[2]); s2 = $realtime;
    check(near(s2 - r0, 2 * TINV, 0.01), "stage 2 lags two inverter delays");
    @(negedge clk); f0 = $realtime;
    @(posedge clk); r1 = $realtime;
    $display("period %0.3f ps, high %0.3f ps", r1 - r0, f0 - r0);
    check(near(r1 - r0, 2 * N * TINV, 0.01), "period 2*N*Tinv");
    check(near(f0 - r0, N * TINV, 0.01), "50% duty");
    check((r1 - r0) > 990.0 && (r1 - r0) < 1030.0, "89 stages give about 1 ns");
    @(posedge pulse[0]); p0s = $realtime;
    check(stage[1] == 1'b1, "stage 1 still high at the pulse start");
    @(negedge pulse[0]); p0e = $realtime;
    check(near(p0e - p0s, TINV, 0.01), "Reset pulse one inverter wide");
    check(near(p0s - r1, 2 * N * TINV, 0.01), "pulse at rising edge of stage 0");
    @(posedge pulse[1]); p1s = $realtime;
    check(near(p1s - p0s, N * TINV + TINV, 0.01), "pulse[1] phase");
    en = 0;
    #(3 * N * TINV);
    edges = 0;
    fork
      begin repeat (10) begin @(clk); edges++; end end
      #(4 * N * TINV);
    join_any
    disable fork;
    check(edges == 0, "ring stopped");
    check(clk == 1'b0 && stage[1] == 1'b1 && stage[2] == 1'b0, "rest state after stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
