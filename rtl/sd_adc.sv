// sd_adc: digital half of a first-order sigma-delta ADC built inside the FPGA.
//
// The controller needs the converter output voltage without an external ADC
// chip. Here the analog half is a resistor divider, an RC integrator and an
// FPGA input used as a comparator: cmp_i is high while the divided input
// voltage is above the integrator voltage. Each clock the comparator is
// sampled into a flip-flop whose output fb_o drives the RC feedback, which
// closes a first-order sigma-delta loop; the density of ones on fb_o equals
// the input voltage as a fraction of the feedback swing. The ones are counted
// over a window of OSR clocks. At the end of each window code_o takes the
// count (0..OSR) and valid_o pulses high for one clock; valid_o is the
// sample enable of the rest of the controller.
//
// Timing: the first code appears OSR clocks after reset is released, then one
// every OSR clocks. With the default OSR = 2000 at 200 MHz the sample rate is
// 100 kHz, equal to the PWM rate, and the code resolution is 1/2000 of full
// scale.
//
// The design description says only that the conversion is done inside the
// FPGA; the sigma-delta structure, the window length and the code format are
// this design's choices.
module sd_adc
  import siflc_pkg::*;
#(
  parameter int unsigned OSR    = ADC_OSR,
  parameter int unsigned CODE_W = ADC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmp_i,     // comparator: input above feedback integrator
  output logic              fb_o,      // 1-bit feedback to the RC integrator
  output logic [CODE_W-1:0] code_o,    // ones counted in the last window
  output logic              valid_o    // one-clock pulse with each new code
);

  localparam int unsigned CNT_W = $clog2(OSR);

  logic [CNT_W-1:0]  win_cnt;
  logic [CODE_W-1:0] ones_cnt;
  logic              win_last;

  assign win_last = (win_cnt == CNT_W'(OSR - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_o     <= 1'b0;
      win_cnt  <= '0;
      ones_cnt <= '0;
      code_o   <= '0;
      valid_o  <= 1'b0;
    end else begin
      fb_o    <= cmp_i;
      valid_o <= win_last;
      // the sample enable is a single-clock pulse
      a_pulse: assert (!(valid_o && win_last));
      if (win_last) begin
        win_cnt  <= '0;
        code_o   <= ones_cnt + CODE_W'(fb_o);
        ones_cnt <= '0;
      end else begin
        win_cnt  <= win_cnt + 1'b1;
        ones_cnt <= ones_cnt + CODE_W'(fb_o);
      end
    end
  end

  initial begin
    assert (OSR >= 2 && OSR < (1 << CODE_W))
      else $error("sd_adc: OSR must fit in CODE_W bits");
  end

endmodule
