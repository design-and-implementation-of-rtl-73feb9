// tb_pwm_gen: the PWM generator at its default 2000-count period. For random
// duty counts (including 0, 1, 1999, 2000 and above) each period must be
// exactly 2000 clocks (100 kHz at 200 MHz), start with period_start, and have
// its high time equal to the duty count taken at the period start, as one
// contiguous pulse from the start of the period; a duty change in mid-period
// must not affect the running period.
`timescale 1ns / 1ps
module tb_pwm_gen;
  localparam int P = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [10:0] duty = '0;
  logic pwm, pstart;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  pwm_gen dut (.clk, .rst_n, .duty_i(duty), .pwm_o(pwm), .period_start_o(pstart));

  initial begin
    int values [8] = '{0, 1, 1999, 2000, 2047, 1000, 697, 1599};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // align to a period start
    @(posedge clk);
    while (!pstart) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      int d_now, high, edges, len, exp_high;
      logic prev;
      // duty was taken from the value present in the clock before this start
      d_now = int'(duty);
      exp_high = (d_now > P) ? P : d_now;
      // new duty arrives mid-period and must only apply to the next period
      high = 0; edges = 0; len = 0; prev = 1'b1;
      do begin
        if (len == 500) duty <= 11'((n < 8) ? values[n] : $urandom_range(2047));
        if (pwm) high++;
        if (pwm && !prev) edges++;
        prev = pwm;
        len++;
        @(posedge clk);
      end while (!pstart);
      checks++;
      if (len != P || high != exp_high || edges != 0) begin
        failures++;
        $display("FAIL period %0d: length %0d high %0d expected %0d/%0d, %0d extra rising edges",
                 n, len, high, P, exp_high, edges);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5 * P * 70);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
