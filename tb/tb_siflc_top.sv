// tb_siflc_top: closed-loop test of the whole controller at its default
// parameters (200 MHz clock, 2000-count PWM period, 2000-clock ADC window)
// against behavioural models of the boost power stage (E = 10 V, L = 250 uH,
// C = 100 uF, RL = 0.1 ohm, R = 10 ohm) and of the ADC analog front end
// (25 V full scale, so 80 codes per volt).
//
// Sequence, each phase run until the output has settled:
//   1. start-up from 10 V to a 15 V reference, symmetrical surface
//   2. load step 10 -> 5 ohm, and back
//   3. reference steps 15 -> 12.5 -> 15 V
//   4. the same load and reference steps with the asymmetrical surface
//   5. input sag to 2.5 V, which needs more than the 0.8 duty limit
//   6. reference below the input voltage, which drives the duty cycle to 0
// Checks: the output voltage settles within 0.15 V of the reference after
// each phase (1-4); the PWM period is 2000 clocks and its high time equals
// the duty count applied; the duty cycle never exceeds the limit; the duty
// register follows the ADC sample by two clocks. Each mechanism (every PWL
// region of both surfaces, distance clipping, both duty limits, surface
// switch, load and reference steps) is counted and must occur; the
// symmetrical surface is a single segment and has no middle region.
`timescale 1ns / 1ps
module tb_siflc_top;
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

  // ---------------- mechanism counters ----------------
  int region_cnt [2][4];
  int clip_cnt = 0, max_cnt = 0, min_cnt = 0;
  int surface_switches = 0, load_steps = 0, ref_steps = 0;

  always @(posedge clk) if (rst_n && sample) begin
    region_cnt[surface][region]++;
    if (d_clip) clip_cnt++;
    if (duty_limit && duty != 0) max_cnt++;
    if (duty_limit && duty == 0) min_cnt++;
    checks++;
    if (duty > DUTY_W'(DUTY_LIMIT)) begin
      failures++;
      $display("FAIL duty %0d above limit", duty);
    end
  end

  // ---------------- PWM period and pulse width ----------------
  int per_cnt = 0, high_cnt = 0, period_checks = 0;
  logic [DUTY_W-1:0] duty_applied = '0;
  logic seen_period = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (pwm_period) begin
      if (seen_period) begin
        period_checks++;
        if (per_cnt != PWM_PERIOD || high_cnt != int'(duty_applied)) begin
          failures++;
          $display("FAIL pwm period %0d high %0d expected %0d/%0d",
                   per_cnt, high_cnt, PWM_PERIOD, duty_applied);
        end
      end
      seen_period  <= 1'b1;
      duty_applied <= duty;          // value taken at this period start
      per_cnt  <= 1;
      high_cnt <= pwm ? 1 : 0;
    end else begin
      per_cnt  <= per_cnt + 1;
      high_cnt <= high_cnt + (pwm ? 1 : 0);
    end
  end

  // ---------------- sample-to-duty latency ----------------
  logic adc_valid_d1, adc_valid_d2;
  int latency_errors = 0;
  always @(posedge clk) begin
    adc_valid_d1 <= dut.adc_valid;
    adc_valid_d2 <= adc_valid_d1;
    if (rst_n && (sample != adc_valid_d2)) latency_errors++;
  end

  // ---------------- helpers ----------------
  function automatic logic [ADC_W-1:0] volts(real v);
    return ADC_W'(int'(v * real'(ADC_OSR) / VFS));
  endfunction

  task automatic run_ms(real ms);
    repeat (int'(ms * 200000.0)) @(posedge clk);
  endtask

  // average |vo - target| over the last millisecond of a phase
  task automatic settle(string what, real ms, real target);
    real acc;
    run_ms(ms - 1.0);
    acc = 0.0;
    repeat (200000) begin
      @(posedge clk);
      acc += (vo > target) ? vo - target : target - vo;
    end
    acc = acc / 200000.0;
    checks++;
    if (acc > 0.15) begin
      failures++;
      $display("FAIL %s: mean |vo - %0.2f| = %0.3f V", what, target, acc);
    end else
      $display("ok   %s: vo = %0.3f V, mean error %0.3f V, duty %0d", what, vo, acc, duty);
  endtask

  task automatic steps(string tag);
    r_load = 5.0;  load_steps++;  settle({tag, " load 10->5 ohm"}, 15.0, 15.0);
    r_load = 10.0; load_steps++;  settle({tag, " load 5->10 ohm"}, 15.0, 15.0);
    vref = volts(12.5); ref_steps++; settle({tag, " ref 15->12.5 V"}, 30.0, 12.5);
    vref = volts(15.0); ref_steps++; settle({tag, " ref 12.5->15 V"}, 30.0, 15.0);
  endtask

  initial begin
    vref = volts(15.0);
    surface = SURF_SYM;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;

    settle("sym start-up 10->15 V", 40.0, 15.0);
    steps("sym");

    surface = SURF_ASYM; surface_switches++;
    settle("asym after switch", 5.0, 15.0);
    steps("asym");

    e_in = 2.5;  run_ms(10.0);           // needs D > 0.8: limiter holds
    e_in = 10.0; settle("input sag recovered", 30.0, 15.0);
    vref = volts(8.0); run_ms(10.0);     // below the input: duty to zero
    vref = volts(15.0); settle("ref below input recovered", 40.0, 15.0);

    checks++;
    if (latency_errors != 0) begin
      failures++;
      $display("FAIL duty update not two clocks after the sample (%0d times)", latency_errors);
    end
    checks++;
    if (period_checks < 100) begin
      failures++;
      $display("FAIL only %0d PWM periods checked", period_checks);
    end

    for (int s = 0; s < 2; s++)
      for (int r = 0; r < 4; r++) begin
        if (s == 0 && r == 1) continue;   // the symmetrical surface has no middle region
        $display("surface %0d region %0d: %0d samples", s, r, region_cnt[s][r]);
        checks++;
        if (region_cnt[s][r] == 0) begin
          failures++;
          $display("FAIL surface %0d region %0d never used", s, r);
        end
      end
    $display("clip %0d  duty max %0d  duty min %0d  switches %0d  load steps %0d  ref steps %0d",
             clip_cnt, max_cnt, min_cnt, surface_switches, load_steps, ref_steps);
    checks += 6;
    if (clip_cnt == 0) begin failures++; $display("FAIL distance never clipped"); end
    if (max_cnt == 0)  begin failures++; $display("FAIL duty never at upper limit"); end
    if (min_cnt == 0)  begin failures++; $display("FAIL duty never at zero"); end
    if (surface_switches == 0) failures++;
    if (load_steps == 0) failures++;
    if (ref_steps == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: far beyond the planned 380 ms of simulated time
  initial begin
    #(600_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
