// siflc_top: single-input fuzzy logic voltage controller for a boost
// converter.
//
// One voltage loop: the output voltage is converted by the in-FPGA
// sigma-delta ADC once per PWM period; the error against the reference and
// its change form the signed distance d; the piecewise-linear control surface
// maps d to the change of control output uo; uo is scaled by Ku and
// integrated into the duty cycle, which is limited below 0.8 and turned into
// a 100 kHz, 5 ns resolution PWM pulse for the MOSFET.
//
//   adc_cmp_i -> sd_adc -> error_differentiator -> signed_distance
//             -> pwl_surface -> duty_integrator -> pwm_gen -> pwm_o
//
// Timing: everything runs on the 200 MHz clock. sd_adc pulses its valid
// every ADC_OSR clocks; error_differentiator registers e and de one clock
// later; the combinational signed distance and table look-up settle within
// that clock and duty_integrator registers the new duty cycle on the next;
// pwm_gen applies it from its next period. So a sample reaches the switch
// within one PWM period. The combinational path between the error registers
// and the integrator is used once per sample and may be constrained as a
// multicycle path.
//
// Ports besides the ADC and PWM pins: vref_i, the reference in ADC codes;
// surface_i, which control surface is used (it may change at any time);
// and monitoring outputs for the sample, the duty cycle, the signed distance,
// the PWL region, the limiter and clipping flags and the PWM period start.
//
// The chain of blocks, the sequential/combinational split, the 200 MHz clock
// and the 100 kHz PWM follow the design description; the fixed-point formats
// and the coefficient values are this design's choices.
module siflc_top
  import siflc_pkg::*;
#(
  parameter int unsigned              OSR       = ADC_OSR,
  parameter int unsigned              PERIOD    = PWM_PERIOD,
  parameter logic signed [COEF_W-1:0] KE        = 16'sd512,
  parameter logic signed [COEF_W-1:0] KDE       = 16'sd5120,
  parameter logic signed [KU_W-1:0]   KU        = 16'sd164,
  parameter int unsigned              DUTY_MAX  = DUTY_LIMIT,
  parameter int                       BP1_D     = 80,
  parameter int                       BP1_U     = 80,
  parameter int                       BP2_D     = 240,
  parameter int                       BP2_U     = 160
) (
  input  logic                clk,          // 200 MHz
  input  logic                rst_n,
  // ADC pins
  input  logic                adc_cmp_i,
  output logic                adc_fb_o,
  // switch drive
  output logic                pwm_o,
  // configuration
  input  logic [ADC_W-1:0]    vref_i,
  input  surface_e            surface_i,
  // monitoring
  output logic [ADC_W-1:0]    vo_code_o,
  output logic                sample_o,
  output logic [DUTY_W-1:0]   duty_o,
  output logic signed [D_W-1:0] d_o,
  output pwl_region_e         region_o,
  output logic                duty_limit_o,
  output logic                d_clip_o,
  output logic                pwm_period_o
);

  logic                      adc_valid;
  logic signed [ERR_W-1:0]   e;
  logic signed [DERR_W-1:0]  de;
  logic                      ed_valid;
  logic signed [D_W-1:0]     d;
  logic                      d_clip;
  logic signed [U_W-1:0]     uo;
  logic                      at_max, at_min, duty_valid;
  logic                      period_start;

  sd_adc #(.OSR(OSR), .CODE_W(ADC_W)) u_adc (
    .clk, .rst_n,
    .cmp_i   (adc_cmp_i),
    .fb_o    (adc_fb_o),
    .code_o  (vo_code_o),
    .valid_o (adc_valid)
  );

  error_differentiator #(.IN_W(ADC_W)) u_diff (
    .clk, .rst_n,
    .en_i    (adc_valid),
    .vref_i  (vref_i),
    .vo_i    (vo_code_o),
    .e_o     (e),
    .de_o    (de),
    .valid_o (ed_valid)
  );

  signed_distance #(.E_W(ERR_W), .DE_W(DERR_W), .KE(KE), .KDE(KDE), .OUT_W(D_W)) u_dist (
    .e_i    (e),
    .de_i   (de),
    .d_o    (d),
    .clip_o (d_clip)
  );

  pwl_surface #(
    .IN_W(D_W), .OUT_W(U_W),
    .BP1_D(BP1_D), .BP1_U(BP1_U), .BP2_D(BP2_D), .BP2_U(BP2_U)
  ) u_surface (
    .d_i      (d),
    .mode_i   (surface_i),
    .uo_o     (uo),
    .region_o (region_o)
  );

  duty_integrator #(.IN_W(U_W), .KU(KU), .OUT_W(DUTY_W), .DUTY_MAX(DUTY_MAX)) u_integ (
    .clk, .rst_n,
    .en_i     (ed_valid),
    .uo_i     (uo),
    .duty_o   (duty_o),
    .at_max_o (at_max),
    .at_min_o (at_min),
    .valid_o  (duty_valid)
  );

  pwm_gen #(.PERIOD(PERIOD), .IN_W(DUTY_W)) u_pwm (
    .clk, .rst_n,
    .duty_i         (duty_o),
    .pwm_o          (pwm_o),
    .period_start_o (period_start)
  );

  assign sample_o     = duty_valid;
  assign d_o          = d;
  assign duty_limit_o = at_max | at_min;
  assign d_clip_o     = d_clip;
  assign pwm_period_o = period_start;

endmodule
