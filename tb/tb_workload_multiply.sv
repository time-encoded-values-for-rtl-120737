`timescale 1ps/1fs
// tb_workload_multiply: the PWM multiplication experiment. 1000 pairs of
// random values are encoded as continuous PWM signals, the first with a
// 20 ns period and the second with a 13 ns period (high part at the end of
// each period), and multiplied by the AND multiplier for 260 ns, the least
// common multiple of the periods. The measured high fraction of the output
// is compared with the product; the mean absolute error must stay below
// 0.5%. For contrast, 200 pairs are run with harmonically related periods
// (20 ns and 10 ns): their mean error must be clearly larger (above 2%),
// which shows that the period choice, not the gate, makes the result right.
// Operation-time sweep: the same 200 pairs at 20 ns / 13 ns run for 130,
// 200, 260, 330, 390, 520, 650 and 780 ns. The mean error at the common
// multiples (260, 520, 780 ns) must be below that at every other time.
// Period-set comparison: 200 pairs at each of the relatively prime period
// pairs 3/2, 5/3, 17/3, 17/7 and 19/17 ns, each run for its LCM. The pair
// with the largest LCM (19/17, 323 ns) must beat the smallest (3/2, 6 ns),
// and 17/7 (119 ns) must beat 17/3 (51 ns).
module tb_workload_multiply;
  int checks = 0, failures = 0;
  logic a, b, y;
  realtime t_high, t_rise;

  sc_multiplier dut (.a(a), .b(b), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge y) t_rise = $realtime;
  always @(negedge y) t_high += $realtime - t_rise;

  // One multiplication: periods in ps, values da and db, run for t_run ps.
  task automatic multiply(input real pa, input real pb, input real da, input real db,
                          input real t_run, output real result);
    a = 0; b = 0;
    #10;
    t_high = 0.0;
    fork
      begin : gen_a
        forever begin a = (da >= 1.0); #(pa * (1.0 - da)); a = (da > 0.0); #(pa * da); end
      end
      begin : gen_b
        forever begin b = (db >= 1.0); #(pb * (1.0 - db)); b = (db > 0.0); #(pb * db); end
      end
      #(t_run);
    join_any
    disable fork;
    a = 0; b = 0;
    #1;
    result = t_high / t_run;
  endtask

  initial begin
    real da, db, r, err, sum_err, sum_err_h;
    sum_err = 0.0;
    for (int n = 0; n < 1000; n++) begin
      da = real'($urandom_range(0, 1000)) / 1000.0;
      db = real'($urandom_range(0, 1000)) / 1000.0;
      multiply(20000.0, 13000.0, da, db, 260000.0, r);
      err = (r > da * db) ? r - da * db : da * db - r;
      sum_err += err;
      check(err < 0.02, $sformatf("%0.3f x %0.3f gave %0.4f", da, db, r));
    end
    $display("20/13 ns periods: mean error %0.3f %% over 1000 pairs", 100.0 * sum_err / 1000.0);
    check(sum_err / 1000.0 < 0.005, "mean error below 0.5% with inharmonic periods");
    sum_err_h = 0.0;
    for (int n = 0; n < 200; n++) begin
      da = real'($urandom_range(0, 1000)) / 1000.0;
      db = real'($urandom_range(0, 1000)) / 1000.0;
      multiply(20000.0, 10000.0, da, db, 260000.0, r);
      sum_err_h += (r > da * db) ? r - da * db : da * db - r;
    end
    $display("20/10 ns periods: mean error %0.3f %% over 200 pairs", 100.0 * sum_err_h / 200.0);
    check(sum_err_h / 200.0 > 0.02, "harmonic periods give a clearly larger error");
    begin : time_sweep
      real tops [8];
      real err_t [8];
      real va [200], vb [200];
      real worst_lcm, best_other;
      tops = '{130000.0, 200000.0, 260000.0, 330000.0, 390000.0, 520000.0, 650000.0, 780000.0};
      foreach (va[n]) begin
        va[n] = real'($urandom_range(0, 1000)) / 1000.0;
        vb[n] = real'($urandom_range(0, 1000)) / 1000.0;
      end
      worst_lcm = 0.0; best_other = 1.0;
      foreach (tops[t]) begin
        err_t[t] = 0.0;
        foreach (va[n]) begin
          multiply(20000.0, 13000.0, va[n], vb[n], tops[t], r);
          err_t[t] += (r > va[n] * vb[n]) ? r - va[n] * vb[n] : va[n] * vb[n] - r;
        end
        err_t[t] /= 200.0;
        $display("20/13 ns periods, operation time %0.0f ns: mean error %0.3f %%", tops[t] / 1000.0, 100.0 * err_t[t]);
        if (t == 2 || t == 5 || t == 7) begin
          if (err_t[t] > worst_lcm) worst_lcm = err_t[t];
        end else if (err_t[t] < best_other) best_other = err_t[t];
      end
      check(worst_lcm < best_other, "common multiples of the periods give the lowest error");
    end
    begin : period_sets
      real pa [5], pb [5], e [5];
      pa = '{3000.0, 5000.0, 17000.0, 17000.0, 19000.0};
      pb = '{2000.0, 3000.0, 3000.0, 7000.0, 17000.0};
      foreach (pa[k]) begin
        e[k] = 0.0;
        for (int n = 0; n < 200; n++) begin
          da = real'($urandom_range(0, 1000)) / 1000.0;
          db = real'($urandom_range(0, 1000)) / 1000.0;
          multiply(pa[k], pb[k], da, db, pa[k] * pb[k] / 1000.0, r);
          e[k] += (r > da * db) ? r - da * db : da * db - r;
        end
        e[k] /= 200.0;
        $display("periods %0.0f/%0.0f ns, LCM %0.0f ns: mean error %0.3f %%",
                 pa[k] / 1000.0, pb[k] / 1000.0, pa[k] * pb[k] / 1.0e6, 100.0 * e[k]);
      end
      check(e[4] < e[0], "largest LCM more accurate than smallest");
      check(e[3] < e[2], "17/7 ns (LCM 119 ns) more accurate than 17/3 ns (LCM 51 ns)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
