`timescale 1ps/1fs
// tb_pwm_generator: checks the ramp/comparator PWM generator clocked by an
// 89-stage ring (about 1 ns period). For duty cycles 0.2, 0.5 and 0.8 (and
// 0 and a few random values) the sensing current is set to
// C*Vref / (T*(1-D) - T_reset) and, over five periods, the measured duty
// cycle must be within 0.5% of D, the period must equal the ring period and
// the high part must end at the Reset pulse (end of the period).
module tb_pwm_generator;
  int checks = 0, failures = 0;
  localparam real TINV = 5.69;
  localparam real T    = 2.0 * 89.0 * TINV;
  logic en, clk, pwm;
  logic [88:0] stage, pulse;
  real  i_in;

  ring_oscillator #(.N_STAGES(89), .T_INV_PS(TINV)) u_ring (
    .en(en), .stage(stage), .pulse(pulse), .clk(clk)
  );
  pwm_generator dut (.i_in(i_in), .reset(pulse[0]), .pwm(pwm));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1us;
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real current_for(real d);
    if (d <= 0.0) return 0.0;
    return 5.0e-15 * 0.5 / ((T * (1.0 - d) - TINV) * 1.0e-12);
  endfunction

  initial begin
    real duties[7];
    realtime t0, t_rise, high, last_fall;
    real d_meas;
    duties = '{0.2, 0.5, 0.8, 0.0, 0.0, 0.0, 0.0};
    for (int k = 4; k < 7; k++) duties[k] = real'($urandom_range(5, 95)) / 100.0;
    en = 0; i_in = 0.0;
    #50;
    en = 1;
    foreach (duties[k]) begin
      i_in = current_for(duties[k]);
      @(posedge pulse[0]);          // settle one period
      @(posedge pulse[0]); t0 = $realtime;
      high = 0; last_fall = 0;
      fork
        begin
          forever begin
            @(posedge pwm); t_rise = $realtime;
            @(negedge pwm); high += $realtime - t_rise; last_fall = $realtime;
          end
        end
        begin repeat (5) @(posedge pulse[0]); end
      join_any
      disable fork;
      if (pwm) high += $realtime - t_rise;
      d_meas = high / ($realtime - t0);
      $display("duty target %0.3f measured %0.4f", duties[k], d_meas);
      check(d_meas - duties[k] < 0.005 && duties[k] - d_meas < 0.005,
            $sformatf("duty %0.3f", duties[k]));
      check(near_period($realtime - t0), "five ring periods");
      if (duties[k] > 0.0)
        check(($realtime - last_fall) < 0.2 || ((($realtime - last_fall) - T) < 0.2 &&
              (T - ($realtime - last_fall)) < 0.2), "high part ends at Reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near_period(real dt);
    return (dt - 5.0 * T < 0.01) && (5.0 * T - dt < 0.01);
  endfunction
endmodule
