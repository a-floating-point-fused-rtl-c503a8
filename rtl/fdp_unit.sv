// Fused dot-product unit, combinational core.
//
// Computes, with a single rounding (to nearest, ties to even),
//   MODE_DOT:  Y = A*B + C*D   (op_sub_i = 0)   or  A*B - C*D  (op_sub_i = 1)
//   MODE_ADD:  Y = A + C       or  A - C     (multiplier trees bypassed)
//   MODE_MUL:  Y = C*D         or  -(C*D)    (aligner bypassed, A and B ignored)
// on IEEE-754 single-precision operands.
//
// Data path, following the document's block diagram: two multiplier trees
// leave both significand products in carry-save form; the exponent compare
// circuit picks the product with the larger exponent and the alignment
// distance; the aligner shifts the smaller product's pair into a wide window;
// the 2's-complement stage negates it on an effective subtraction; a 4:2
// carry-save reduction merges the four vectors into two; one carry-propagate
// adder and, in parallel, a leading-zero anticipator follow; the result is
// complemented to a magnitude, normalised by the anticipated count, rounded
// and post-normalised. The forwarding multiplexers for the addition-only and
// multiplication-only modes are the document's; the exact window size,
// rounding mode, flush of subnormals to zero and special-value rules are
// this design's choices (see fdp_pkg, fdp_align and fdp_round).
//
// Special values: a NaN operand, Inf*0 in a used pair, or the sum of two
// infinite products of opposite sign give the quiet NaN 0x7FC00000; otherwise
// an infinite product gives an infinity of its sign. An exact zero is +0
// unless both products are zeros of the same negative sign (-0).
module fdp_unit
  import fdp_pkg::*;
(
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  input  logic [31:0] c_i,
  input  logic [31:0] d_i,
  input  logic        op_sub_i,   // "Operation": subtract the C*D product
  input  fdp_mode_e   mode_i,
  output logic [31:0] y_o,
  // Observation of internal mechanisms (for test and debug).
  output logic        ab_bigger_o,
  output logic        eff_sub_o,
  output logic        sticky_o,
  output logic        neg_result_o
);

  fp_unpacked_t ua, ub, uc, ud;

  fdp_unpack u_unp_a (.op_i(a_i), .unp_o(ua));
  fdp_unpack u_unp_b (.op_i(b_i), .unp_o(ub));
  fdp_unpack u_unp_c (.op_i(c_i), .unp_o(uc));
  fdp_unpack u_unp_d (.op_i(d_i), .unp_o(ud));

  logic add_only, mul_only;
  assign add_only = (mode_i == MODE_ADD);
  assign mul_only = (mode_i == MODE_MUL);

  // Multiplier trees.
  cs_prod_t ab_tree, cd_tree, ab_prod, cd_prod;

  fdp_mult_tree u_tree_ab (.a_i(ua.sig), .b_i(ub.sig), .sum_o(ab_tree.s), .carry_o(ab_tree.c));
  fdp_mult_tree u_tree_cd (.a_i(uc.sig), .b_i(ud.sig), .sum_o(cd_tree.s), .carry_o(cd_tree.c));

  // Forwarding multiplexers and per-product sign, class and exponent.
  logic             s_ab, s_cd, z_ab, z_cd, i_ab, i_cd, n_ab, n_cd;
  logic [EXP_W-1:0] eb_eff, ed_eff;

  always_comb begin
    if (add_only) begin
      // A and C skip the trees: significand placed as a product by 1.0.
      ab_prod = '{s: PROD_W'({ua.sig, {FRAC_W{1'b0}}}), c: '0};
      cd_prod = '{s: PROD_W'({uc.sig, {FRAC_W{1'b0}}}), c: '0};
      eb_eff  = EXP_W'(BIAS);
      ed_eff  = EXP_W'(BIAS);
      s_ab    = ua.sign;
      s_cd    = uc.sign ^ op_sub_i;
      z_ab    = ua.is_zero;
      z_cd    = uc.is_zero;
      i_ab    = ua.is_inf;
      i_cd    = uc.is_inf;
      n_ab    = ua.is_nan;
      n_cd    = uc.is_nan;
    end else begin
      ab_prod = ab_tree;
      cd_prod = cd_tree;
      eb_eff  = ub.exp;
      ed_eff  = ud.exp;
      s_ab    = ua.sign ^ ub.sign;
      s_cd    = uc.sign ^ ud.sign ^ op_sub_i;
      z_ab    = ua.is_zero | ub.is_zero;
      z_cd    = uc.is_zero | ud.is_zero;
      i_ab    = ua.is_inf | ub.is_inf;
      i_cd    = uc.is_inf | ud.is_inf;
      n_ab    = ua.is_nan | ub.is_nan | (i_ab & z_ab);
      n_cd    = uc.is_nan | ud.is_nan | (i_cd & z_cd);
      if (mul_only) begin
        ab_prod = '0;
        s_ab    = s_cd;
        z_ab    = 1'b1;
        i_ab    = 1'b0;
        n_ab    = 1'b0;
      end
    end
  end

  // Exponent compare.
  logic                     ab_bigger;
  logic [SHIFT_W-1:0]       shift;
  logic signed [PEXP_W-1:0] result_exp;
  logic signed [ADJ_W-1:0]  exp_adjust;

  fdp_exp_compare u_exp (
    .ea_i(ua.exp), .eb_i(eb_eff), .ec_i(uc.exp), .ed_i(ed_eff),
    .ab_zero_i(z_ab), .cd_zero_i(z_cd), .exp_adjust_i(exp_adjust),
    .ab_bigger_o(ab_bigger), .align_shift_o(shift),
    .big_exp_o(), .result_exp_o(result_exp)
  );

  // Align.
  logic [WIN_W-1:0] big_s, big_c, sml_s, sml_c;

  fdp_align u_align (
    .ab_i(ab_prod), .cd_i(cd_prod), .ab_zero_i(z_ab), .cd_zero_i(z_cd),
    .ab_bigger_i(ab_bigger), .shift_i(shift), .mul_only_i(mul_only),
    .big_s_o(big_s), .big_c_o(big_c), .sml_s_o(sml_s), .sml_c_o(sml_c),
    .sticky_o(sticky_o)
  );

  // 2's complement on effective subtraction.
  logic             eff_sub, big_sign;
  logic [WIN_W-1:0] neg_s, neg_c;
  logic [1:0]       cin;

  assign eff_sub  = s_ab ^ s_cd;
  assign big_sign = (ab_bigger && !mul_only) ? s_ab : s_cd;

  fdp_twos_comp u_tc (
    .s_i(sml_s), .c_i(sml_c), .negate_i(eff_sub),
    .s_o(neg_s), .c_o(neg_c), .cin_o(cin)
  );

  // 4:2 CSA, adder and LZA.
  logic [WIN_W-1:0] red_s, red_c, sum;
  logic [LZ_W-1:0]  lz;

  fdp_csa42 u_csa (
    .x0_i(big_s), .x1_i(big_c), .x2_i(neg_s), .x3_i(neg_c), .cin_i(cin),
    .sum_o(red_s), .carry_o(red_c)
  );
  fdp_adder u_add (.a_i(red_s), .b_i(red_c), .sum_o(sum));
  fdp_lza   u_lza (.a_i(red_s), .b_i(red_c), .lz_o(lz));

  // Complement, normalise, round.
  logic [WIN_W-1:0] mag, norm;
  logic             neg;

  fdp_complement u_cmp  (.x_i(sum), .mag_o(mag), .neg_o(neg));

  // The window's two sign bits never hold the magnitude; the anticipator's
  // one-bit accuracy depends on it.
  always_comb begin
    a_range: assert (mag[WIN_W-1 -: 2] == 2'b00)
      else $error("dot-product magnitude exceeds the window");
  end
  fdp_normalize  u_norm (.mag_i(mag), .lz_i(lz), .norm_o(norm));

  logic nan, inf, inf_sign, zero_sign;

  assign nan       = n_ab | n_cd | (i_ab & i_cd & (s_ab != s_cd));
  assign inf       = i_ab | i_cd;
  assign inf_sign  = i_ab ? s_ab : s_cd;
  assign zero_sign = z_ab & z_cd & s_ab & s_cd;

  fdp_round u_round (
    .norm_i(norm), .lz_i(lz), .sign_i(big_sign ^ neg), .zero_sign_i(zero_sign),
    .nan_i(nan), .inf_i(inf), .inf_sign_i(inf_sign),
    .exp_adjust_o(exp_adjust), .result_exp_i(result_exp), .result_o(y_o)
  );

  assign ab_bigger_o  = ab_bigger;
  assign eff_sub_o    = eff_sub;
  assign neg_result_o = neg;

endmodule
