// duty_integrator: output gain, integrator and duty-cycle limiter.
//
// The fuzzy controller produces the change of the control output, uo. This
// block scales it by the output gain Ku and, at each enable, adds the result
// to an accumulator that holds the duty cycle:
//     acc[n] = clamp(acc[n-1] + Ku*uo, 0, DUTY_MAX * 2^FRAC)
// The accumulator keeps FRAC fraction bits below the 5 ns PWM count so that
// small corrections are not lost. The clamp is the duty-cycle limiter that
// keeps the boost converter below D = 0.8; it also keeps the integrator from
// winding up. duty_o is the integer part of the accumulator in PWM counts;
// at_max_o / at_min_o report that the last update hit the limit.
//
// Timing: the accumulator and its outputs update one clock after en_i;
// valid_o marks that clock. After reset the duty cycle is DUTY_INIT.
//
// The gain, the integrator and the limit D < 0.8 follow the design
// description. The fixed-point format, the lower limit of zero, the clamp
// acting as anti-windup and the default Ku (chosen with the signed-distance
// coefficients for a stable loop) are this design's choices.
module duty_integrator
  import siflc_pkg::*;
#(
  parameter int unsigned          IN_W      = U_W,
  parameter int unsigned          KW        = KU_W,
  parameter logic signed [KW-1:0] KU        = 16'sd164,
  parameter int unsigned          OUT_W     = DUTY_W,
  parameter int unsigned          FRAC      = DUTY_FRAC,
  parameter int unsigned          DUTY_MAX  = DUTY_LIMIT,
  parameter int unsigned          DUTY_INIT = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en_i,
  input  logic signed [IN_W-1:0]  uo_i,
  output logic        [OUT_W-1:0] duty_o,
  output logic                    at_max_o,
  output logic                    at_min_o,
  output logic                    valid_o
);

  localparam int unsigned ACC_W = OUT_W + FRAC + 2;   // sign and carry guard
  localparam logic signed [ACC_W-1:0] ACC_MAX = ACC_W'(DUTY_MAX) <<< FRAC;
  localparam logic signed [ACC_W-1:0] ACC_INIT = ACC_W'(DUTY_INIT) <<< FRAC;

  logic signed [IN_W+KW-1:0] uk;
  logic signed [ACC_W-1:0]   acc, acc_sum;

  always_comb begin
    uk      = (IN_W+KW)'(uo_i) * (IN_W+KW)'(KU);
    acc_sum = acc + ACC_W'(uk);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= ACC_INIT;
      at_max_o <= 1'b0;
      at_min_o <= 1'b0;
      valid_o  <= 1'b0;
    end else begin
      valid_o <= en_i;
      // the limiter must hold the state inside its range whatever the input
      a_range: assert (acc >= 0 && acc <= ACC_MAX);
      if (en_i) begin
        at_max_o <= 1'b0;
        at_min_o <= 1'b0;
        if (acc_sum >= ACC_MAX) begin
          acc      <= ACC_MAX;
          at_max_o <= 1'b1;
        end else if (acc_sum <= 0) begin
          acc      <= '0;
          at_min_o <= 1'b1;
        end else begin
          acc <= acc_sum;
        end
      end
    end
  end

  assign duty_o = acc[FRAC +: OUT_W];

  initial begin
    assert (DUTY_MAX < (1 << OUT_W) && DUTY_INIT <= DUTY_MAX)
      else $error("duty_integrator: limits must fit in OUT_W bits");
  end

endmodule
