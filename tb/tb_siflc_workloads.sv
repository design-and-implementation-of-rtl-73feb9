// tb_siflc_workloads: the disturbance tests used to evaluate the controller,
// run on the full controller at its default parameters with the behavioural
// boost stage (E = 10 V, L = 250 uH, C = 100 uF, RL = 0.1 ohm) and ADC front
// end (25 V full scale).
//
// For each control surface, symmetrical then asymmetrical:
//   * start-up to 15 V at 10 ohm (the second surface takes over at 15 V);
//   * load step 10 -> 5 ohm at 15 V, then 5 -> 10 ohm (30 ms each);
//   * reference stepped 15 -> 12.5 -> 15 V at 120 ms intervals, 10 ohm load.
// For each step the testbench reports the largest deviation from the
// new reference after the step (for a reference step this includes the step
// itself) and the settling time into a +/-2 % band (the
// last time the output was outside it). It checks that every step settles
// into the band within its interval and that the mean error over the last
// millisecond is below 1 % of the reference.
`timescale 1ns / 1ps
module tb_siflc_workloads;
  import siflc_pkg::*;

  localparam real VFS = 25.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic adc_cmp, adc_fb, pwm;
  logic [ADC_W-1:0] vref;
  surface_e surface;
  logic [ADC_W-1:0] vo_code;
  logic sample;
  logic [DUTY_W-1:0] duty;
  logic signed [D_W-1:0] d;
  pwl_region_e region;
  logic duty_limit, d_clip, pwm_period;

  real e_in = 10.0, r_load = 10.0, vo, il;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  siflc_top dut (
    .clk, .rst_n,
    .adc_cmp_i (adc_cmp), .adc_fb_o (adc_fb), .pwm_o (pwm),
    .vref_i (vref), .surface_i (surface),
    .vo_code_o (vo_code), .sample_o (sample), .duty_o (duty), .d_o (d),
    .region_o (region), .duty_limit_o (duty_limit), .d_clip_o (d_clip),
    .pwm_period_o (pwm_period)
  );

  adc_frontend_model #(.VFS(VFS)) u_afe (.clk, .vin(vo), .fb(adc_fb), .cmp_o(adc_cmp));
  boost_plant_model u_plant (.clk, .sw(pwm), .e_in, .r_load, .vo, .il);

  function automatic logic [ADC_W-1:0] volts(real v);
    return ADC_W'(int'(v * real'(ADC_OSR) / VFS));
  endfunction

  // run one step of length ms; the output is sampled every 1 us
  task automatic measure(string what, real ms, real target);
    real peak, last_out, err, mean;
    int  n;
    peak = 0.0; last_out = 0.0; mean = 0.0;
    n = int'(ms * 1000.0);
    for (int k = 0; k < n; k++) begin
      repeat (200) @(posedge clk);
      err = vo - target;
      if (err < 0.0) err = -err;
      if (err > peak) peak = err;
      if (err > 0.02 * target) last_out = real'(k + 1) / 1000.0;
      if (k >= n - 1000) mean += err / 1000.0;
    end
    $display("%-28s peak deviation %6.3f V, settled (2%%) after %7.3f ms, final error %0.3f V",
             what, peak, last_out, mean);
    checks += 2;
    if (last_out > ms - 1.0) begin
      failures++;
      $display("FAIL %s did not settle", what);
    end
    if (mean > 0.01 * target) begin
      failures++;
      $display("FAIL %s steady-state error %0.3f V", what, mean);
    end
  endtask

  initial begin
    vref = volts(15.0);
    surface = SURF_SYM;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 2; s++) begin
      string tag;
      surface = surface_e'(s);
      tag = (s == 0) ? "sym " : "asym";
      r_load = 10.0; vref = volts(15.0);
      measure({tag, (s == 0) ? " start-up to 15 V" : " surface switch at 15 V"}, 40.0, 15.0);
      r_load = 5.0;  measure({tag, " load 10 -> 5 ohm"}, 30.0, 15.0);
      r_load = 10.0; measure({tag, " load 5 -> 10 ohm"}, 30.0, 15.0);
      vref = volts(12.5); measure({tag, " ref 15 -> 12.5 V"}, 120.0, 12.5);
      vref = volts(15.0); measure({tag, " ref 12.5 -> 15 V"}, 120.0, 15.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(800_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
