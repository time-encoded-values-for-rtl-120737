`timescale 1ps/1fs
// pwm_sc_pkg: constants shared by the time-encoded (PWM) stochastic circuits.
//
// Time is in picoseconds, currents in amperes, voltages in volts.
// Ring-oscillator periods follow from the inverter delay: a ring of N
// inverters oscillates with period 2 * N * T_INV_PS. The stage counts are
// those of the two case studies (43/29 stages for the Robert's cross pixel
// and select clocks, 53/79 stages for the gamma-correction x and coefficient
// clocks); each operation time is the near-common multiple of the two ring
// periods of its engine, counted from a Reset pulse of the pixel ring.
//
// pwm_current() gives the sensing current for which the ramp/comparator PWM
// generator produces a requested duty cycle: the comparator output rises when
// the ramp I*t/C passes VREF, so the high time is
// T - T_reset - C*VREF/I, and I = C*VREF / (T*(1-D) - T_reset).
package pwm_sc_pkg;

  parameter real T_INV_PS   = 5.69;    // one inverter delay (45 nm)
  parameter real VDD        = 1.0;
  parameter real C_RAMP_F   = 5.0e-15; // ramp capacitor
  parameter real VREF       = 0.5;     // comparator reference

  // Robert's cross case study
  parameter int  RC_PIX_STAGES = 43;   // ~0.51 ns pixel clock
  parameter int  RC_SEL_STAGES = 29;   // ~0.34 ns select clock
  // Two pixel periods (three select periods, 2 * 330.02 = 990 ps, nearly):
  // the 1.02 ns of the nominal 0.51/0.34 ns clocks, scaled to the periods
  // that 43 and 29 stages of 5.69 ps actually give.
  parameter real RC_T_OP_PS    = 4.0 * 43.0 * T_INV_PS;

  // Gamma correction case study
  parameter int  GAMMA_DEGREE   = 6;
  parameter int  GAMMA_X_STAGES = 53;  // ~0.60 ns x clock
  parameter int  GAMMA_B_STAGES = 79;  // ~0.90 ns coefficient clock
  // Three x periods (two coefficient periods, 2 * 899.02 = 1798 ps, nearly).
  parameter real GAMMA_T_OP_PS  = 6.0 * 53.0 * T_INV_PS;
  parameter real BERN_COEF [GAMMA_DEGREE+1] =
    '{0.0955, 0.7207, 0.3476, 0.9988, 0.7017, 0.9695, 0.9939};
  // Ring stages whose rising edges reset the six x generators (one phase
  // each); chosen by minimising the mean error of the whole circuit against
  // x^0.45 over input values 0.02..0.98 with ideal PWM signals, averaged over
  // the phase of the coefficient ring relative to the x ring.
  parameter int  GAMMA_X_TAPS [GAMMA_DEGREE] = '{11, 25, 37, 43, 46, 49};

  function automatic real ring_period_ps(int stages);
    return 2.0 * real'(stages) * T_INV_PS;
  endfunction

  function automatic real pwm_current(real duty, real period_ps, real reset_ps);
    real t_cross_ps;
    if (duty <= 0.0) return 0.0;
    t_cross_ps = period_ps * (1.0 - duty) - reset_ps;
    if (t_cross_ps < 0.01) t_cross_ps = 0.01;
    return C_RAMP_F * VREF / (t_cross_ps * 1.0e-12);
  endfunction

endpackage
