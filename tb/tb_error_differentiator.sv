// tb_error_differentiator: random references and samples with random gaps
// between enables. After each enable, e must be vref - vo and de the
// difference with the error of the previous enabled sample (zero for the
// first sample after reset), valid must follow the enable by one clock, and
// the outputs must hold between enables.
`timescale 1ns / 1ps
module tb_error_differentiator;
  localparam int unsigned W = 12;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  logic [W-1:0] vref = '0, vo = '0;
  logic signed [W:0] e;
  logic signed [W+1:0] de;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;

  error_differentiator #(.IN_W(W)) dut (
    .clk, .rst_n, .en_i(en), .vref_i(vref), .vo_i(vo), .e_o(e), .de_o(de), .valid_o(valid)
  );

  initial begin
    int prev_e;
    bit first = 1'b1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      int exp_e, exp_de, gap;
      vref <= W'($urandom_range(2000));
      vo   <= W'((n % 7 == 0) ? $urandom_range(4095) : $urandom_range(2000));
      en   <= 1'b1;
      @(posedge clk);
      en   <= 1'b0;
      exp_e  = int'(vref) - int'(vo);
      exp_de = first ? 0 : exp_e - prev_e;
      @(negedge clk);
      checks++;
      if (!valid || int'(e) != exp_e || int'(de) != exp_de) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d valid=%0b e=%0d/%0d de=%0d/%0d", n, valid, e, exp_e, de, exp_de);
      end
      prev_e = exp_e;
      first  = 1'b0;
      gap = $urandom_range(3);
      // inputs change but no enable: outputs hold
      vref <= W'($urandom_range(2000));
      vo   <= W'($urandom_range(2000));
      repeat (gap + 1) @(posedge clk);
      @(negedge clk);
      checks++;
      if (valid || int'(e) != exp_e || int'(de) != exp_de) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d outputs changed without enable", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
