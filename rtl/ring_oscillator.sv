`timescale 1ps/1fs
// ring_oscillator: BEHAVIOURAL MODEL (not synthesizable) of the inverter-ring
// clock generator that sets the period of the PWM signals.
//
// A ring of an odd number N_STAGES of inverters, each with delay T_INV_PS,
// oscillates with period 2 * N_STAGES * T_INV_PS (89 stages give about 1 ns
// with 5.69 ps inverters). Every stage output is a 50% clock; stage k is the
// output of stage 0 delayed by k inverter delays and inverted when k is odd,
// so the taps provide clocks of the same period at 2*N_STAGES-spaced phases.
// pulse[k] is the narrow Reset pulse (one inverter delay wide) that starts at
// each rising edge of stage k; it is formed from stage k and stage k+1.
//
// Interface: en starts the ring (stage 0 rises at the rising edge of en);
// when en falls every stage returns at once to its rest value (odd stages
// high). clk is stage 0.
// Timing: continuous-time; the model uses real-valued delays.
module ring_oscillator #(
  parameter int  N_STAGES = 89,
  parameter real T_INV_PS = 5.69
) (
  input  logic                en,
  output logic [N_STAGES-1:0] stage,
  output logic [N_STAGES-1:0] pulse,
  output logic                clk
);
  localparam real HALF_PS = real'(N_STAGES) * T_INV_PS;

  for (genvar k = 0; k < N_STAGES; k++) begin : g_stage
    logic s;
    initial s = (k % 2 == 1);
    always begin
      s = (k % 2 == 1);
      wait (en == 1'b1);
      fork
        begin
          #(real'(k) * T_INV_PS);
          forever begin
            s = ~s;
            #(HALF_PS);
          end
        end
        @(negedge en);
      join_any
      disable fork;
    end
    assign stage[k] = s;
    assign pulse[k] = stage[k] & stage[(k + 1) % N_STAGES];
  end

  assign clk = stage[0];
endmodule
