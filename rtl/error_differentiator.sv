// error_differentiator: error and change of error of the voltage loop.
//
// At each sample enable (en_i) the block forms the error e = vref - vo from
// the reference and the new ADC code, and the change of error
// de = e[n] - e[n-1], the difference with the previous sample. Both are
// registered and held until the next enable; valid_o pulses one clock after
// en_i. The very first sample after reset has no predecessor, so its change
// of error is forced to zero instead of reporting a jump from zero.
//
// Interface: vref_i and vo_i are unsigned ADC codes; e_o and de_o are signed
// codes of the same scale, one and two bits wider.
//
// The description names a clocked differentiator started by an enable and
// the error input of the controller; the backward difference, the sign
// convention (positive when the output is below the reference) and the
// first-sample rule are this design's choices.
module error_differentiator
  import siflc_pkg::*;
#(
  parameter int unsigned IN_W = ADC_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en_i,
  input  logic        [IN_W-1:0] vref_i,
  input  logic        [IN_W-1:0] vo_i,
  output logic signed [IN_W:0]   e_o,
  output logic signed [IN_W+1:0] de_o,
  output logic                   valid_o
);

  logic signed [IN_W:0] e_new;
  logic                 primed;

  assign e_new = $signed({1'b0, vref_i}) - $signed({1'b0, vo_i});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_o     <= '0;
      de_o    <= '0;
      primed  <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= en_i;
      if (en_i) begin
        e_o    <= e_new;
        de_o   <= primed ? (IN_W+2)'(e_new) - (IN_W+2)'(e_o) : '0;
        primed <= 1'b1;
      end
    end
  end

endmodule
