// pwl_surface: the control surface of the single-input fuzzy controller,
// held as a look-up table.
//
// With triangular input membership functions, singleton outputs and
// centre-of-gravity defuzzification, the one-dimensional rule table reduces to
// a piecewise-linear (PWL) function of the signed distance d, odd-symmetric
// about the origin. Fuzzification, inference and defuzzification therefore
// collapse into one table read. Two surfaces are stored and mode_i selects
// one at run time:
//   * symmetrical:  one unity slope from the origin to the edge of the
//                   universe of discourse (UoD), d = uo = 100 units;
//   * asymmetrical: three slopes joined at breakpoints BP1 and BP2, by
//                   default (20, 20), (60, 40) and the UoD edge (100, 100):
//                   unity slope up to BP1, half slope up to BP2, then a
//                   steeper slope up to saturation.
// Beyond the UoD edge the output saturates at the edge value. Points are given
// in table codes, four per unit, so the defaults are the units times four.
//
// Each table entry holds the output uo and the PWL region of its index, so
// region_o (inner, middle, outer, saturated) costs no extra logic. The tables
// are built at elaboration time by linear interpolation between the
// breakpoints, rounded to the nearest code; the read is combinational.
//
// Interface: d_i is the signed table index (D_W bits, two's complement used
// directly as address); uo_o is the signed output (U_W bits).
//
// The table form, the unity slope of the symmetrical surface, the saturation
// beyond the UoD and the asymmetrical breakpoint positions follow the design
// description; the code scaling and the table size (2^D_W entries per
// surface) are this design's choices.
module pwl_surface
  import siflc_pkg::*;
#(
  parameter int unsigned IN_W      = D_W,
  parameter int unsigned OUT_W     = U_W,
  // symmetrical surface: UoD edge (d, uo)
  parameter int          SYM_UOD   = UOD_CODES,
  parameter int          SYM_USAT  = USAT_CODES,
  // asymmetrical surface: BP1, BP2 and UoD edge (d, uo)
  parameter int          BP1_D     = 80,
  parameter int          BP1_U     = 80,
  parameter int          BP2_D     = 240,
  parameter int          BP2_U     = 160,
  parameter int          ASYM_UOD  = UOD_CODES,
  parameter int          ASYM_USAT = USAT_CODES
) (
  input  logic signed [IN_W-1:0]  d_i,
  input  surface_e                mode_i,
  output logic signed [OUT_W-1:0] uo_o,
  output pwl_region_e             region_o
);

  localparam int unsigned DEPTH   = 1 << IN_W;
  localparam int unsigned ENTRY_W = OUT_W + 2;

  typedef logic [ENTRY_W-1:0] table_t [DEPTH];

  // value of the segment from (x0, y0) to (x1, y1) at x, rounded to nearest
  function automatic int interp(int x, int x0, int y0, int x1, int y1);
    int num;
    num = (x - x0) * (y1 - y0);
    return y0 + (2 * num + (x1 - x0)) / (2 * (x1 - x0));
  endfunction

  // table of a surface with breakpoints (p1d, p1u), (p2d, p2u), edge (p3d, p3u)
  function automatic table_t build(int p1d, int p1u, int p2d, int p2u, int p3d, int p3u);
    table_t t;
    for (int i = 0; i < int'(DEPTH); i++) begin
      int d, a, u;
      pwl_region_e r;
      d = (i >= int'(DEPTH / 2)) ? i - int'(DEPTH) : i;
      a = (d < 0) ? -d : d;
      if (a >= p3d) begin
        u = p3u;                         r = REG_SAT;
      end else if (a >= p2d) begin
        u = interp(a, p2d, p2u, p3d, p3u); r = REG_OUTER;
      end else if (a >= p1d) begin
        u = interp(a, p1d, p1u, p2d, p2u); r = REG_MID;
      end else begin
        u = interp(a, 0, 0, p1d, p1u);     r = REG_INNER;
      end
      if (d < 0) u = -u;
      t[i] = {r, OUT_W'(u)};
    end
    return t;
  endfunction

  // the symmetrical surface is a single segment: its "breakpoints" sit on
  // the line at half the UoD
  localparam table_t SYM_TABLE  = build(SYM_UOD / 2, SYM_USAT / 2, SYM_UOD / 2, SYM_USAT / 2,
                                        SYM_UOD, SYM_USAT);
  localparam table_t ASYM_TABLE = build(BP1_D, BP1_U, BP2_D, BP2_U, ASYM_UOD, ASYM_USAT);

  logic [IN_W-1:0]    addr;
  logic [ENTRY_W-1:0] entry;

  always_comb begin
    addr     = IN_W'(d_i);
    entry    = (mode_i == SURF_ASYM) ? ASYM_TABLE[addr] : SYM_TABLE[addr];
    uo_o     = $signed(entry[OUT_W-1:0]);
    region_o = pwl_region_e'(entry[ENTRY_W-1:OUT_W]);
  end

  initial begin
    assert (BP1_D > 0 && BP2_D >= BP1_D && ASYM_UOD > BP2_D && SYM_UOD > 0)
      else $error("pwl_surface: breakpoints must increase along d");
    assert (ASYM_UOD < int'(DEPTH / 2) && SYM_UOD < int'(DEPTH / 2))
      else $error("pwl_surface: UoD edge must lie inside the table");
  end

endmodule
