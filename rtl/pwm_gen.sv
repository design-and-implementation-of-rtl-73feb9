// pwm_gen: high-resolution PWM for the boost converter switch.
//
// A counter runs from 0 to PERIOD-1 on the 200 MHz clock, so the output
// frequency is 200 MHz / PERIOD (100 kHz by default) and the pulse width has a
// resolution of one clock, 5 ns. The duty count is taken into a shadow
// register at the start of each period, so a change of duty_i in mid-period
// never cuts a pulse short or produces a second one. pwm_o is high for the
// first duty clocks of the period (duty = 0 keeps it low, duty >= PERIOD keeps
// it high) and comes straight from a flip-flop. period_start_o pulses in the
// clock whose pwm_o is the first of a new period.
//
// The 200 MHz clock, the 5 ns resolution and the 100 kHz maximum rate follow
// the design description; the leading-edge-aligned counter and the shadow
// register are this design's choices.
module pwm_gen
  import siflc_pkg::*;
#(
  parameter int unsigned PERIOD = PWM_PERIOD,
  parameter int unsigned IN_W   = DUTY_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [IN_W-1:0] duty_i,
  output logic            pwm_o,
  output logic            period_start_o
);

  localparam int unsigned CNT_W = $clog2(PERIOD);

  logic [CNT_W-1:0] cnt;
  logic [IN_W-1:0]  duty_q;
  logic             last;

  assign last = (cnt == CNT_W'(PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt            <= '0;
      duty_q         <= '0;
      pwm_o          <= 1'b0;
      period_start_o <= 1'b0;
    end else begin
      period_start_o <= last;
      if (last) begin
        cnt    <= '0;
        duty_q <= duty_i;
        pwm_o  <= (duty_i != '0);
      end else begin
        cnt   <= cnt + 1'b1;
        pwm_o <= ({1'b0, cnt} + 1'b1) < (CNT_W+1)'(duty_q);
      end
    end
  end

endmodule
