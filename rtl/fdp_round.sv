// Round and post-normalise, and pack the 32-bit result.
//
// The normalised magnitude has its leading one in one of its top three bits
// (the LZA may be one position off either way); a final 0/1/2-bit shift
// removes that error. The top 24 bits are the significand, the next bit is
// the guard bit and the OR of the rest is the sticky bit; rounding is to
// nearest, ties to even. A rounding carry (significand 2^24) post-normalises
// to 1.0 with the exponent one higher. The exponent adjustment
// (headroom - lz + correction + rounding carry) goes to the exponent compare
// circuit, which returns the result exponent for packing. Packing handles
// NaN (canonical quiet NaN), infinity, exact zero (with the sign given by the
// caller), overflow to infinity and underflow: a result whose exponent falls
// below the normal range is flushed to a signed zero (no subnormal outputs).
// Purely combinational; the two halves are kept in separate blocks because
// the result exponent passes through the exponent circuit in between, as the
// published exponent diagram draws it. The rounding mode, the +-1 correction
// and the overflow/underflow/special-value rules are this design's choices.
module fdp_round
  import fdp_pkg::*;
(
  input  logic [WIN_W-1:0]         norm_i,
  input  logic [LZ_W-1:0]          lz_i,
  input  logic                     sign_i,       // sign of a non-zero result
  input  logic                     zero_sign_i,  // sign of an exact-zero result
  input  logic                     nan_i,
  input  logic                     inf_i,
  input  logic                     inf_sign_i,
  output logic signed [ADJ_W-1:0]  exp_adjust_o,
  input  logic signed [PEXP_W-1:0] result_exp_i,
  output logic [31:0]              result_o
);

  // Bias of the adjustment: leading one at WIN_W-2 means the bigger product's
  // exponent plus the headroom above its 1.x position.
  localparam int ADJ0 = int'(WIN_W) - 2 - (int'(PROD_W) - 2) - int'(ALIGN_EXT);

  logic [WIN_W-1:0]  sh;
  logic signed [2:0] corr;
  logic              is_zero, guard, sticky, lsb, up;
  logic [SIG_W:0]    sig_r;
  logic [FRAC_W-1:0] frac;

  always_comb begin
    is_zero = 1'b0;
    if (norm_i[WIN_W-1]) begin
      sh   = norm_i;
      corr = 3'sd1;
    end else if (norm_i[WIN_W-2]) begin
      sh   = norm_i << 1;
      corr = 3'sd0;
    end else begin
      sh      = norm_i << 2;
      corr    = -3'sd1;
      is_zero = !norm_i[WIN_W-3];
    end
    lsb    = sh[WIN_W-SIG_W];
    guard  = sh[WIN_W-SIG_W-1];
    sticky = |sh[WIN_W-SIG_W-2:0];
    up     = guard & (sticky | lsb);
    sig_r  = {1'b0, sh[WIN_W-1 -: SIG_W]} + (SIG_W+1)'(up);
    frac   = sig_r[SIG_W] ? sig_r[SIG_W-1 -: FRAC_W] : sig_r[FRAC_W-1:0];
    exp_adjust_o = ADJ_W'(ADJ0) - ADJ_W'(signed'({1'b0, lz_i}))
                 + ADJ_W'(corr) + ADJ_W'(signed'({1'b0, sig_r[SIG_W]}));
  end

  always_comb begin
    if (nan_i)
      result_o = CANON_NAN;
    else if (inf_i)
      result_o = {inf_sign_i, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    else if (is_zero)
      result_o = {zero_sign_i, 31'b0};
    else if (result_exp_i >= PEXP_W'(255))
      result_o = {sign_i, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    else if (result_exp_i <= 0)
      result_o = {sign_i, 31'b0};
    else
      result_o = {sign_i, result_exp_i[EXP_W-1:0], frac};
  end

endmodule
