// approx_mult: signed fixed-point multiplier (or squarer, with both operands
// tied together) with a selectable approximation.
//
// The exact multiplier is written as a partial-product matrix: row j is the
// multiplicand, sign-extended and shifted left by j, AND-ed with bit j of the
// multiplier; the row of the multiplier's sign bit has negative weight and is
// subtracted. The rows are summed by an adder tree left to synthesis. On top of
// this array, METHOD selects one of the three approximations studied for the
// approximate core:
//   AM_EXACT       - the full array.
//   AM_PP_TRUNC    - every partial-product bit in a column below PPT_COLS is
//                    removed (treated as 0); the result is biased negative.
//   AM_INPUT_TRUNC - the TRUNC_A / TRUNC_B low bits of the operands are forced
//                    to 0 before the full array (also biased negative).
//   AM_DRUM        - dynamic range unbiased multiplier: from each operand
//                    magnitude the DRUM_K bits starting at the leading one are
//                    kept, the lowest kept bit is forced to 1, an exact
//                    DRUM_K x DRUM_K product is formed and shifted back, and the
//                    sign is restored. Operands shorter than DRUM_K bits pass
//                    exactly.
// Interface: p is the full WA+WB-bit product, with fractional length equal to
// the sum of the operands' fractional lengths. Purely combinational.
// The array structure and the three methods follow the document; the defaults
// of PPT_COLS and DRUM_K, and the sign handling of DRUM, are this design's own.
module approx_mult
  import ls_pkg::*;
#(
  parameter int unsigned    WA       = 16,
  parameter int unsigned    WB       = 16,
  parameter approx_method_t METHOD   = AM_EXACT,
  parameter int unsigned    TRUNC_A  = 0,
  parameter int unsigned    TRUNC_B  = 0,
  parameter int unsigned    PPT_COLS = 0,
  parameter int unsigned    DRUM_K   = 8
) (
  input  logic signed [WA-1:0]    a,
  input  logic signed [WB-1:0]    b,
  output logic signed [WA+WB-1:0] p
);
  localparam int unsigned WP = WA + WB;

  // ---------------------------------------------------------------------------
  // Partial-product array (exact, PP truncation, input truncation)
  // ---------------------------------------------------------------------------
  logic signed [WA-1:0] a_op;
  logic signed [WB-1:0] b_op;
  logic signed [WP-1:0] array_sum;
  logic signed [WP-1:0] row;
  logic        [WP-1:0] col_mask;

  always_comb begin
    a_op = a;
    b_op = b;
    if (METHOD == AM_INPUT_TRUNC) begin
      for (int i = 0; i < int'(TRUNC_A) && i < int'(WA); i++) a_op[i] = 1'b0;
      for (int i = 0; i < int'(TRUNC_B) && i < int'(WB); i++) b_op[i] = 1'b0;
    end
    col_mask = '1;
    if (METHOD == AM_PP_TRUNC) begin
      for (int i = 0; i < int'(PPT_COLS) && i < int'(WP); i++) col_mask[i] = 1'b0;
    end
    array_sum = '0;
    for (int j = 0; j < int'(WB); j++) begin
      row = b_op[j] ? (WP'(a_op) <<< j) : '0;
      row = row & col_mask;
      if (j == int'(WB) - 1) array_sum = array_sum - row;
      else                   array_sum = array_sum + row;
    end
  end

  // ---------------------------------------------------------------------------
  // DRUM
  // ---------------------------------------------------------------------------
  localparam int unsigned K = DRUM_K;

  logic [WA-1:0]  mag_a;
  logic [WB-1:0]  mag_b;
  logic [K-1:0]   sel_a, sel_b;
  int unsigned    sh_a, sh_b;
  logic [2*K-1:0] core_p;
  logic [WP-1:0]  drum_mag;
  logic signed [WP-1:0] drum_p;

  always_comb begin
    mag_a = a[WA-1] ? WA'(-a) : WA'(a);
    mag_b = b[WB-1] ? WB'(-b) : WB'(b);
    // leading-one positions decide how far each operand is shifted down
    sh_a = 0;
    for (int i = 0; i < int'(WA); i++)
      if (mag_a[i] && i >= int'(K)) sh_a = i - K + 1;
    sh_b = 0;
    for (int i = 0; i < int'(WB); i++)
      if (mag_b[i] && i >= int'(K)) sh_b = i - K + 1;
    sel_a = K'(mag_a >> sh_a);
    sel_b = K'(mag_b >> sh_b);
    if (sh_a != 0) sel_a[0] = 1'b1;
    if (sh_b != 0) sel_b[0] = 1'b1;
    core_p   = (2*K)'(sel_a) * (2*K)'(sel_b);
    drum_mag = WP'(core_p) << (sh_a + sh_b);
    drum_p   = (a[WA-1] ^ b[WB-1]) ? -$signed(drum_mag) : $signed(drum_mag);
  end

  assign p = (METHOD == AM_DRUM) ? drum_p : array_sum;

endmodule
