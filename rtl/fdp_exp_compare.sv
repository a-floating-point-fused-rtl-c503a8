// Exponent compare circuit of the fused dot-product unit.
//
// For each operand pair the two biased exponents are added and the bias is
// subtracted once, giving the biased exponent of each product (A*B and C*D).
// The product with the larger exponent is the "bigger" one; a zero product
// is never chosen as bigger, so a lone non-zero product always sets the scale.
// The alignment shift is bigger minus smaller. The result exponent is the
// bigger exponent plus the adjustment returned by the rounder (leading-zero
// count, carry headroom and rounding carry), as in the document's exponent
// compare figure. Products are not normalised before the comparison: a
// product in [2,4) is absorbed by the window's headroom bit instead of
// by a separate "product overflow" increment. Purely combinational; the
// result-exponent adder is kept apart from the compare logic.
module fdp_exp_compare
  import fdp_pkg::*;
(
  input  logic [EXP_W-1:0]         ea_i,
  input  logic [EXP_W-1:0]         eb_i,
  input  logic [EXP_W-1:0]         ec_i,
  input  logic [EXP_W-1:0]         ed_i,
  input  logic                     ab_zero_i,     // A*B is zero
  input  logic                     cd_zero_i,     // C*D is zero
  input  logic signed [ADJ_W-1:0]  exp_adjust_i,  // from the rounder
  output logic                     ab_bigger_o,   // A*B sets the scale
  output logic [SHIFT_W-1:0]       align_shift_o, // bigger - smaller
  output logic signed [PEXP_W-1:0] big_exp_o,     // biased exponent of bigger product
  output logic signed [PEXP_W-1:0] result_exp_o   // biased exponent of the result
);

  logic signed [PEXP_W-1:0] pexp_ab, pexp_cd, small_exp, diff;

  always_comb begin
    pexp_ab     = PEXP_W'(ea_i) + PEXP_W'(eb_i) - PEXP_W'(BIAS);
    pexp_cd     = PEXP_W'(ec_i) + PEXP_W'(ed_i) - PEXP_W'(BIAS);
    ab_bigger_o = cd_zero_i || (!ab_zero_i && (pexp_ab >= pexp_cd));
    big_exp_o   = ab_bigger_o ? pexp_ab : pexp_cd;
    small_exp   = ab_bigger_o ? pexp_cd : pexp_ab;
    diff        = big_exp_o - small_exp;
    // With one product zero the distance is meaningless (the aligner sees a
    // zero vector); it is still non-negative-or-clamped to keep it bounded.
    align_shift_o = diff[PEXP_W-1] ? '0 : SHIFT_W'(diff);
  end

  always_comb begin
    result_exp_o = big_exp_o + PEXP_W'(exp_adjust_i);
  end

endmodule
