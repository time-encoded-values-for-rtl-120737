# Time-encoded stochastic computing with PWM signals

Stochastic computing represents a number in [0, 1] as the fraction of time a
signal is high. Arithmetic then takes very few gates: an AND gate multiplies,
a multiplexer averages, an XOR gate subtracts. The usual cost is in producing
the random bit streams: a linear-feedback shift register and a comparator per
input, plus hundreds of clock cycles per result.

This design replaces the random streams with **pulse-width-modulated (PWM)
signals**. A value is the duty cycle of a periodic pulse. Each pulse comes from
a tiny analog generator: a capacitor charged by the sensor current, a
comparator, and a ring-oscillator clock. PWM signals are not random. Correct
results come from choosing the signal **periods** well and running each
operation for exactly the right time, usually one common multiple of the
periods. One result then takes one or two nanoseconds instead of hundreds of
clock cycles.

The RTL contains:

* the gate-level operators (multiply, scaled add, absolute subtract) and the
  two multi-level example circuits (`rtl/sc_*.sv`, `rtl/multilevel_*.sv`);
* the two image-processing cores: a Robert's cross edge detector and a
  degree-6 Bernstein-polynomial (ReSC) gamma-correction core;
* behavioural models of the analog parts: ring-oscillator clock generator,
  ramp generator, comparator, PWM generator and output integrator;
* two complete pixel engines built from these parts, and a top level
  (`pwm_sc_top`) that holds both engines side by side, with the two
  multi-level example circuits beside them on their own PWM input ports.

## Values, signals and the three operations

A PWM signal with period T that is high for D·T of every period carries the
unipolar value D, or the bipolar value 2D − 1. In this design every generator
places the high part at the **end** of its period. The signal is low after
each Reset pulse and rises when the ramp crosses the reference.

| operation | gate | what the inputs must satisfy | time until the result is exact |
|---|---|---|---|
| multiply x·y (`sc_multiplier`) | AND (XNOR when bipolar) | periods not harmonically related: with integer periods, relatively prime | least common multiple (LCM) of the periods |
| scaled add (1−s)·x0 + s·x1 (`sc_scaled_adder`) | 2:1 MUX | inputs may be correlated; the select period must not be harmonic with the input period. Use an even select period and odd input periods | LCM of input and select periods |
| scaled subtract (1−s)·x0 − s·x1, bipolar (`sc_scaled_adder`, `SUBTRACT = 1`) | 2:1 MUX with input 1 inverted | as for scaled add | as for scaled add |
| absolute subtract \|x1 − x2\| (`sc_abs_subtractor`) | XOR | **synchronized** inputs: same period, high parts aligned | one period |

Why multiplication needs relatively prime periods: take a stream of period m
with a ones and one of period n with b ones. Over m·n time units, a one of the
first stream meets every position of the second stream exactly once when m
and n are relatively prime. The AND output then holds exactly a·b ones. If the
periods share a factor, the same positions meet again and again. The product
is then wrong, and running longer does not help.
`tb_multilevel_and_chain` shows both cases.
Running past the LCM does not improve the result either, because the output
repeats with the LCM as its period.

The output of a gate is no longer a PWM signal, but it is periodic. The LCM
of its inputs' periods is its period, so it can feed another level of gates:

* `multilevel_and_chain`: a chain of ANDs. With pairwise relatively prime
  periods P1..P4 the product settles after P1·P2·P3·P4. With continuous
  duty cycles it is then within a fraction of a percent (periods of 7, 11,
  13 and 9 units give about 0.2% mean error).
* `multilevel_mixed`: AND(P1, P2) on MUX input 0, XOR of two synchronized P3
  signals on input 1, select P4. If P3 = P1·P2 is odd and P4 is a small even
  number, the circuit finishes after P3·P4.

## The PWM generator and its clocks

```
 sensing current ──► ramp_generator ──► (+) analog_comparator ──► pwm
                     (C = 5 fF, reset     (−) Vref = 0.5 V
                      switch)
 ring_oscillator ── pulse[k] (Reset) ──┘
```

* `ring_oscillator`: a ring of N inverters of 5.69 ps each has period
  2·N·5.69 ps. For example, 89 stages give 1.013 ns. Every stage is a 50% clock
  of the same period. Stage k lags stage 0 by k inverter delays and is inverted
  when k is odd. `pulse[k]` is a one-inverter-wide Reset pulse at each rising
  edge of stage k. Because of the inversions, a ring with an odd N offers N
  different Reset phases, spaced T/N apart.
* `ramp_generator`: the capacitor charges with slope I/C and is discharged
  while Reset is high. It saturates at 1 V.
* `analog_comparator`: an ideal comparator with an optional offset.
* `pwm_generator`: the ramp goes to the + input and Vref to the − input.
  The output rises when the ramp crosses Vref and falls at the next Reset:

  D = 1 − (T_reset + C·Vref / I) / T,   so   I = C·Vref / (T·(1 − D) − T_reset).

  The same formula appears as `pwm_current()` in `pwm_sc_pkg`. The duty cycle
  is not linear in the current. A real sensor front end would have to be
  calibrated to match it. The testbenches apply the inverse formula so that
  pixel p gives duty cycle p/255.
* `gmc_integrator`: averages the result back to a voltage. It accumulates
  the high time exactly, and its gain gives 1 V after T_OP for an input that
  is always high.

## Engine 1: Robert's cross edge detector (`roberts_cross_pwm`)

s(i,j) = ( |r(i,j) − r(i+1,j+1)| + |r(i+1,j) − r(i,j+1)| ) / 2

* Four pixel generators share one Reset pulse, from stage 0 of a 43-stage ring
  (period 489.34 ps). The four pixel signals are therefore synchronized, and
  each XOR gives an exact absolute difference every period.
* The select is simply stage 0 of a 29-stage ring (330.02 ps, 50% duty).
* Pixel period to select period is about 3:2, an odd/even pair. Each pixel
  period spends about half its positions on each MUX input within two pixel
  periods. The operation time is therefore two pixel periods, 978.68 ps.
* `roberts_cross_core` holds the gates: XOR(r_ij, r_i1j1) on MUX input 0,
  XOR(r_i1j, r_ij1) on input 1.

## Engine 2: gamma correction x^0.45 (`gamma_pwm`)

The ReSC core (`resc_core`) evaluates the Bernstein polynomial
y = Σ b_k · C(6,k) · x^k · (1−x)^(6−k). It adds six copies of x and uses the
count k = 0..6 to select coefficient signal b_k. The coefficients for x^0.45
are 0.0955, 0.7207, 0.3476, 0.9988, 0.7017, 0.9695 and 0.9939.

The core needs six roughly independent copies of x, and this is the least
obvious part of the design. The copies do not get different frequencies.
All six come from one 53-stage ring (603.14 ps). Each copy is reset from a
different stage, so the copies are phase-shifted versions of the same pulse.
The stage set `GAMMA_X_TAPS = {11, 25, 37, 43, 46, 49}` in `pwm_sc_pkg` was
chosen by a numerical search with ideal PWM signals. The search minimised the
mean error of the whole circuit against x^0.45 for x in 0.02..0.98, averaged
over the unknown phase of the coefficient ring. Equally spaced phases are a
poor choice. They make the adder output almost constant for a given x,
instead of spreading it the way a binomial distribution would. The result is
then a piecewise-linear blend of neighbouring coefficients, and because the
coefficients are not monotonic that blend is far off.

The seven coefficient generators share stage 0 of a 79-stage ring
(899.02 ps). This is allowed because the multiplexer passes only one of them
at a time. Their currents come from the coefficient values, computed at
elaboration. x period to coefficient period is about 2:3. The operation time
is three x periods, 1809.42 ps.

## Running an operation

Both engines, and `pwm_sc_top` for each engine (prefix `rc_` or `g_`), use the
same protocol:

1. Raise `en`. The rings run freely from then on.
2. Apply the pixel current(s). A generator picks up a new current at its next
   Reset, so wait for one or two `frame` pulses. `frame` is the Reset pulse of
   the pixel generators (stage 0 of the x ring for gamma).
3. At a rising edge of `frame`, drop `clear`. Read `v_out` exactly one
   operation time later: `RC_T_OP_PS` = 978.68 ps or `GAMMA_T_OP_PS` =
   1809.42 ps. The result is in volts, with 1 V standing for the value 1.0.
4. Raise `clear` again and continue with the next pixel.

Starting the window on a Reset pulse matters. The results are exact only over
whole common multiples of the periods, and a window that does not line up with
them adds truncation error.

## Measured accuracy

The behavioural engines give the following results (error as a fraction of
full scale, averaged over the pixels):

| test | pixels | mean error |
|---|---|---|
| `tb_roberts_cross_pwm`, random neighbourhoods | 24 | 0.44% |
| `tb_gamma_pwm`, sweep plus random values | 30 | 1.44% |
| `tb_pwm_sc_top`, 8×8 test image, edge engine | 49 | 0.18% |
| `tb_pwm_sc_top`, 8×8 test image, gamma engine | 64 | 1.40% |
| `tb_workload_duty_error`, duty cycles off by up to 10%, edge / gamma | 16 each | 2.9% / 1.9% |
| `tb_workload_duty_error`, duty cycles off by up to 20%, edge / gamma | 16 each | 4.9% / 3.1% |
| `tb_workload_period_error`, ideal waveforms, exact periods, edge / gamma | 50 each | 0.38% / 1.28% |
| `tb_workload_period_error`, ring periods off by up to 10%, edge / gamma | 50 each | 2.9% / 2.2% |
| `tb_workload_period_error`, ring periods off by up to 20%, edge / gamma | 50 each | 4.6% / 3.7% |

A wrong ring period hurts the edge engine as much as a wrong duty cycle
does. The reason is that the read-out still happens after the nominal
operation time, which then no longer covers whole periods.

The bare operations, with ideal PWM inputs:

| test | pairs | mean error |
|---|---|---|
| AND, periods 20 ns and 13 ns, 260 ns | 1000 | 0.03% |
| AND, periods 20 ns and 10 ns (harmonic), 260 ns | 200 | 4.5% |
| AND, 20 ns / 13 ns, stopped at 130, 200, 330, 390 or 650 ns | 200 | 0.26% to 1.35% |
| AND, 20 ns / 13 ns, stopped at 520 or 780 ns | 200 | 0.03% |
| AND, relatively prime pairs 3/2, 5/3, 17/3, 17/7, 19/17 ns, one LCM each | 200 each | 1.41, 0.53, 0.16, 0.07, 0.03% |
| MUX, inputs 5 ns, select 4 ns, 20 ns | 1000 | 0.000% |
| MUX, inputs 4 ns, select 3 ns, 12 ns | 200 | 0.72% |

The source work reports 1.28% (edge) and 2.18% (gamma) from transistor-level
simulation of 128×128 images. The models here are ideal apart from the finite
Reset width and the 0.1 ps ramp time step. They leave out comparator noise,
kT/C noise, jitter, ring-period variation and integrator rise and fall times,
so they are expected to come out more accurate.

## Files

| module | kind | contents |
|---|---|---|
| `pwm_sc_pkg` | package | inverter delay, ring sizes, operation times, coefficients, x phase taps, `pwm_current()` |
| `sc_multiplier`, `sc_scaled_adder`, `sc_abs_subtractor` | synthesizable | the three operations |
| `multilevel_and_chain`, `multilevel_mixed` | synthesizable | multi-level examples |
| `roberts_cross_core`, `resc_core` | synthesizable | the two image-processing cores |
| `ring_oscillator`, `ramp_generator`, `analog_comparator`, `pwm_generator`, `gmc_integrator` | behavioural (real-valued, delays) | analog parts |
| `roberts_cross_pwm`, `gamma_pwm` | behavioural (contain the analog models) | complete engines |
| `pwm_sc_top` | behavioural | both engines plus the two multi-level circuits |

The gate-level modules are purely combinational: the signals are continuous
in time, and there is no system clock. The behavioural models need an
event-driven simulator with timing support. Every file starts with
`` `timescale 1ps/1fs``.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/pwm_sc_pkg.sv tb/tb_pwm_sc_top.sv \
          --top-module tb_pwm_sc_top -Mdir obj_tb
./obj_tb/Vtb_pwm_sc_top
```

Replace `tb_pwm_sc_top` with any other `tb/tb_*.sv`. `tb_pwm_sc_top` runs the
complete design at its default parameters and takes about half a minute. It
also counts the mechanisms it exercises and fails if one never occurs: both
XOR differences, both select values, every adder value 0..6, every
coefficient passed while high, one integrator readout per pixel, every
level of the AND chain going high, and both inputs of the mixed circuit's MUX
being passed. After the engines it drives the two multi-level circuits with
ideal PWM waveforms and checks their outputs.
Three more testbenches repeat the experiments that motivate the period rules:

* `tb_workload_multiply`: 1000 random pairs through the AND multiplier at
  20 ns and 13 ns periods for their 260 ns common multiple, plus a harmonic
  20 ns / 10 ns pair that must come out visibly worse. It also sweeps the
  operation time and compares several relatively prime period pairs.
* `tb_workload_scaled_add`: 1000 random pairs through the MUX with odd (5 ns)
  inputs and an even (4 ns) select, and with even (4 ns) inputs and an odd
  (3 ns) select (200 pairs).
* `tb_workload_duty_error`: both engines with every pixel's duty cycle
  disturbed by a random relative error of up to 0%, 10% and 20%.
* `tb_workload_period_error`: the two cores fed with ideal waveforms whose
  clock periods are off by up to 0%, 5%, 10% and 20%. Each ring gets one
  random error, shared by every signal it drives, and the result is read
  after the nominal operation time.

To change the design:

* Ring sizes and operation times: edit `pwm_sc_pkg`. Keep the two periods of
  an engine near a small-integer ratio (3:2 here), and set the operation time
  to their common multiple.
* A different Bernstein function: change `BERN_COEF`. The x phase taps should
  then be searched again, because the best phases depend on the function.
* A different ramp capacitor or reference: use the `C_F` and `VREF_V`
  parameters of `pwm_generator`. `pwm_current()` assumes the package values.

## Choices this design makes

The following points are choices of this RTL, not taken from the original
description:

* **Ring periods.** The original names 0.51 ns and 0.34 ns periods for the
  Robert's cross clocks and rings of 43 and 29 inverters. With 5.69 ps
  inverters these rings give 489 ps and 330 ps. The RTL follows the inverter
  counts and derives the operation time from them: 978.68 ps instead of
  1.02 ns, and 1809.42 ps instead of 1.8 ns for gamma.
* **Phase taps.** The gamma x phase taps come from this design's own search.
  The original says only that the best set of ring stages was chosen by
  trial.
* **Generator details.** Vref = 0.5 V. The Reset pulse is formed from two
  adjacent ring stages and lasts one inverter delay (5.69 ps). For 8-bit
  accuracy at 1 ns, the original analysis asks for a capacitor discharge
  within about 2 ps. Here the ramp is held at zero for the whole pulse, so
  the largest duty cycle is 1 − 5.69 ps / T (98.8% at the 489 ps pixel
  period), and `pwm_current()` accounts for the pulse width.
* **Coefficient generators.** The original drives the coefficient generators
  from constant voltages through a transconductor. They are modelled here as
  the same current-driven generator.
* **Operation control.** The protocol (`en`, `clear`, `frame`, reading after
  the operation time) is this design's own. The original does not describe
  how an operation is started or read out.
* **Not modelled:** the analog noise and variation analysis, supply-voltage
  tuning of the rings, and the sensor itself. The sensor current is an input
  port.
* **Not included:** the conventional LFSR-based stochastic number generators
  and the binary reference implementations. They serve only as comparison
  baselines.
