// signed_distance: the single input of the fuzzy controller.
//
// The rule table of the two-input controller has a Toeplitz structure: the
// output is constant along diagonals of the (e, de) plane, so it depends only
// on the signed distance of the operating point from the main diagonal
// de + lambda*e = 0:
//     d = (de + lambda*e) / sqrt(1 + lambda^2).
// The block evaluates this with two fixed-point coefficients that also carry
// the input scaling gains of e and de:
//     d = (KE*e + KDE*de) / 2^COEF_FRAC,
//     KE  = Ge  * lambda / sqrt(1 + lambda^2) * 2^COEF_FRAC,
//     KDE = Gde *      1 / sqrt(1 + lambda^2) * 2^COEF_FRAC,
// so lambda = (KE/Ge) / (KDE/Gde). The result is rounded toward minus
// infinity (arithmetic shift) and clipped to the range of the table index,
// D_W signed bits; clip_o reports the clipping.
//
// Purely combinational, as in the described hardware; its inputs are
// registers that change once per sample, so the path may be constrained as a
// multicycle path.
//
// The formula follows the design description. The description gives no value
// of lambda or of the input gains; the defaults (KE = 2.0, KDE = 20.0, that
// is lambda*Ge/Gde = 0.1 per sample) were chosen so that a 2.5 V error
// reaches the edge of the universe of discourse and the closed loop with the
// boost stage is stable.
module signed_distance
  import siflc_pkg::*;
#(
  parameter int unsigned        E_W   = ERR_W,
  parameter int unsigned        DE_W  = DERR_W,
  parameter int unsigned        CW    = COEF_W,
  parameter int unsigned        CFRAC = COEF_FRAC,
  parameter logic signed [CW-1:0] KE  = 16'sd512,
  parameter logic signed [CW-1:0] KDE = 16'sd5120,
  parameter int unsigned        OUT_W = D_W
) (
  input  logic signed [E_W-1:0]   e_i,
  input  logic signed [DE_W-1:0]  de_i,
  output logic signed [OUT_W-1:0] d_o,
  output logic                    clip_o
);

  localparam int unsigned PROD_W = ((E_W > DE_W) ? E_W : DE_W) + CW + 1;
  localparam logic signed [PROD_W-1:0] D_MAX = PROD_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [PROD_W-1:0] D_MIN = -D_MAX;

  logic signed [PROD_W-1:0] acc;
  logic signed [PROD_W-1:0] scaled;

  always_comb begin
    acc    = PROD_W'(e_i) * PROD_W'(KE) + PROD_W'(de_i) * PROD_W'(KDE);
    scaled = acc >>> CFRAC;
    clip_o = 1'b0;
    if (scaled > D_MAX) begin
      d_o    = OUT_W'(D_MAX);
      clip_o = 1'b1;
    end else if (scaled < D_MIN) begin
      d_o    = OUT_W'(D_MIN);
      clip_o = 1'b1;
    end else begin
      d_o = OUT_W'(scaled);
    end
  end

endmodule
