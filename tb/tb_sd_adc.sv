// tb_sd_adc: sd_adc in a loop with the behavioural analog front end.
// A short window (OSR = 200) keeps the run brief. For a set of constant input
// voltages the code must equal OSR*vin/VFS within 2 codes (first-order
// sigma-delta, integrator state carried between windows); codes must arrive
// exactly every OSR clocks, the first one OSR clocks after reset; and a
// digital input pattern with a known number of ones must be counted exactly.
`timescale 1ns / 1ps
module tb_sd_adc;
  localparam int unsigned OSR = 200;
  localparam real VFS = 25.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmp, cmp_model, fb, valid;
  logic [11:0] code;
  logic use_pattern = 1'b0, pattern = 1'b0;
  real vin = 0.0;
  int checks = 0, failures = 0;
  int clk_cnt = 0, last_valid = -1, windows = 0;

  always #2.5 clk = ~clk;

  adc_frontend_model #(.VFS(VFS)) u_afe (.clk, .vin, .fb, .cmp_o(cmp_model));
  assign cmp = use_pattern ? pattern : cmp_model;

  sd_adc #(.OSR(OSR), .CODE_W(12)) dut (
    .clk, .rst_n, .cmp_i(cmp), .fb_o(fb), .code_o(code), .valid_o(valid)
  );

  // spacing of the valid pulses
  always @(posedge clk) if (rst_n) begin
    clk_cnt <= clk_cnt + 1;
    if (valid) begin
      windows++;
      checks++;
      if (last_valid < 0) begin
        if (clk_cnt != OSR) begin
          failures++;
          $display("FAIL first code after %0d clocks, expected %0d", clk_cnt, OSR);
        end
      end else if (clk_cnt - last_valid != OSR) begin
        failures++;
        $display("FAIL codes %0d clocks apart", clk_cnt - last_valid);
      end
      last_valid <= clk_cnt;
    end
  end

  task automatic wait_code();
    @(posedge clk);
    while (!valid) @(posedge clk);
  endtask

  initial begin
    real levels [6] = '{2.0, 7.5, 12.5, 15.0, 19.99, 24.0};
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    foreach (levels[k]) begin
      int expect_code;
      vin = levels[k];
      expect_code = int'(real'(OSR) * vin / VFS);
      wait_code();                 // window that straddles the change
      repeat (3) begin
        wait_code();
        checks++;
        if ((int'(code) - expect_code > 2) || (expect_code - int'(code) > 2)) begin
          failures++;
          $display("FAIL vin %0.2f code %0d expected %0d", vin, code, expect_code);
        end
      end
      $display("vin %0.2f V -> code %0d (ideal %0d)", vin, code, expect_code);
    end

    // exact counting: one in every four clocks, aligned to a window
    use_pattern = 1'b1;
    wait_code();
    fork
      begin : gen
        int n = 0;
        forever begin
          pattern <= ((n % 4) == 0);
          n++;
          @(posedge clk);
        end
      end
    join_none
    wait_code();
    repeat (2) begin
      wait_code();
      checks++;
      if (code != 12'(OSR / 4)) begin
        failures++;
        $display("FAIL pattern code %0d expected %0d", code, OSR / 4);
      end
    end
    disable fork;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(OSR * 5 * 60);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
