// tb_duty_integrator: random changes of control output with random gaps
// between enables, against a reference accumulator in plain integers:
// acc += uo*KU, clamped to [0, DUTY_MAX * 2^16]; duty = acc / 2^16. Checked
// after every enable and while idle. Long runs of the largest positive and
// negative inputs drive the accumulator into both limits, where the limit
// flags must be set, and the duty must never exceed DUTY_MAX (1599 counts,
// just below 0.8 of the 2000-count period). valid must follow the enable by
// one clock.
`timescale 1ns / 1ps
module tb_duty_integrator;
  import siflc_pkg::*;
  localparam int KU = 164;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [9:0] uo = '0;
  logic [10:0] duty;
  logic at_max, at_min, valid;
  int checks = 0, failures = 0;
  int hits_max = 0, hits_min = 0;

  always #2.5 clk = ~clk;

  duty_integrator dut (
    .clk, .rst_n, .en_i(en), .uo_i(uo), .duty_o(duty),
    .at_max_o(at_max), .at_min_o(at_min), .valid_o(valid)
  );

  longint acc = 0;
  localparam longint ACC_MAX = longint'(DUTY_LIMIT) * 65536;

  task automatic step(int u);
    bit emax, emin;
    uo <= 10'(u);
    en <= 1'b1;
    @(posedge clk);
    en <= 1'b0;
    acc = acc + longint'(u) * KU;
    emax = 1'b0; emin = 1'b0;
    if (acc >= ACC_MAX) begin acc = ACC_MAX; emax = 1'b1; end
    else if (acc <= 0)  begin acc = 0;       emin = 1'b1; end
    @(negedge clk);
    checks++;
    if (!valid || int'(duty) != int'(acc / 65536) || at_max != emax || at_min != emin) begin
      failures++;
      if (failures < 10)
        $display("FAIL u=%0d duty=%0d expected %0d flags %0b%0b/%0b%0b", u, duty, acc / 65536,
                 at_max, at_min, emax, emin);
    end
    if (at_max) hits_max++;
    if (at_min) hits_min++;
    checks++;
    if (int'(duty) > int'(DUTY_LIMIT)) failures++;
    repeat ($urandom_range(2)) begin
      @(negedge clk);
      checks++;
      if (valid || int'(duty) != int'(acc / 65536)) failures++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    checks++;
    if (duty != 0) failures++;
    repeat (2000) step($urandom_range(800) - 400);     // random walk
    repeat (3000) step(400);                           // drive into the upper limit
    repeat (500)  step($urandom_range(100) - 20);
    repeat (3000) step(-400);                          // and into the lower one
    repeat (2000) step($urandom_range(60) - 30);       // small steps near zero
    checks += 2;
    if (hits_max == 0) begin failures++; $display("FAIL upper limit never reached"); end
    if (hits_min == 0) begin failures++; $display("FAIL lower limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
