// siflc_pkg: types and constants shared by the single-input fuzzy logic
// controller (SIFLC) blocks.
//
// The controller runs from one 200 MHz clock. Every 2000 clocks (100 kHz, one
// PWM period) the sigma-delta ADC delivers an output-voltage sample and the
// control chain is evaluated once: error and change of error, signed
// distance, piecewise-linear (PWL) control surface, output gain Ku and the
// duty-cycle integrator.
//
// Fixed-point conventions used throughout:
//   * ADC codes are unsigned, 0..ADC_OSR, proportional to the sensed voltage.
//   * The signed distance d and the surface output uo are signed table codes;
//     the universe of discourse (UoD) of +/-100 units maps to +/-UOD_CODES,
//     i.e. four codes per unit.
//   * The duty cycle is a count of 5 ns clock periods inside the 2000-count
//     PWM period; the integrator keeps DUTY_FRAC extra fraction bits.
// The 200 MHz clock, 100 kHz PWM rate, +/-100 UoD and the 0.8 duty limit come
// from the design description; the word widths and code scalings are this
// design's own choices.
package siflc_pkg;

  localparam int unsigned CLK_HZ      = 200_000_000;
  localparam int unsigned PWM_HZ      = 100_000;
  localparam int unsigned PWM_PERIOD  = CLK_HZ / PWM_HZ;   // 2000 counts of 5 ns

  // ADC: one window of the sigma-delta bit stream per PWM period
  localparam int unsigned ADC_OSR     = PWM_PERIOD;
  localparam int unsigned ADC_W       = 12;                // holds 0..2000

  // error e = vref - vo and change of error de = e[n] - e[n-1]
  localparam int unsigned ERR_W       = ADC_W + 1;
  localparam int unsigned DERR_W      = ADC_W + 2;

  // signed-distance coefficients, fixed point with COEF_FRAC fraction bits
  localparam int unsigned COEF_W      = 16;
  localparam int unsigned COEF_FRAC   = 8;

  // control-surface table: signed index d, signed output uo
  localparam int unsigned D_W         = 10;
  localparam int unsigned U_W         = 10;
  localparam int          UOD_CODES   = 400;               // d = +/-100 units
  localparam int          USAT_CODES  = 400;               // uo = +/-100 units

  // duty cycle in PWM counts
  localparam int unsigned DUTY_W      = 11;                // holds 0..2047
  localparam int unsigned DUTY_FRAC   = 16;
  localparam int unsigned DUTY_LIMIT  = (PWM_PERIOD * 4) / 5 - 1; // largest count below D = 0.8
  localparam int unsigned KU_W        = 16;

  // which control surface the table serves
  typedef enum logic {
    SURF_SYM  = 1'b0,   // unity slope through the whole UoD
    SURF_ASYM = 1'b1    // three slopes separated by breakpoints BP1, BP2
  } surface_e;

  // piecewise-linear region of the last table look-up, for monitoring
  typedef enum logic [1:0] {
    REG_INNER = 2'd0,   // |d| below BP1
    REG_MID   = 2'd1,   // BP1 <= |d| < BP2
    REG_OUTER = 2'd2,   // BP2 <= |d| < UoD edge
    REG_SAT   = 2'd3    // |d| at or beyond the UoD edge: output saturated
  } pwl_region_e;

endpackage
