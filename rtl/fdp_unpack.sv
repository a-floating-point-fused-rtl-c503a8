// Operand preprocessor of the fused dot-product unit.
//
// Splits an IEEE-754 single-precision word into sign, biased exponent and the
// 24-bit significand with its hidden one, and classifies it. An exponent
// field of all ones is infinity (zero fraction) or NaN; an exponent field of
// zero is read as zero, so subnormal inputs are flushed to zero (this design's
// choice: the unit handles normal numbers only). The published floorplan has
// a preprocessor region; the field layout is IEEE-754's. Purely combinational.
module fdp_unpack
  import fdp_pkg::*;
(
  input  logic [31:0]  op_i,
  output fp_unpacked_t unp_o
);

  logic [EXP_W-1:0]  exp_f;
  logic [FRAC_W-1:0] frac_f;

  assign exp_f  = op_i[30:23];
  assign frac_f = op_i[22:0];

  always_comb begin
    unp_o.sign    = op_i[31];
    unp_o.exp     = exp_f;
    unp_o.is_zero = (exp_f == '0);
    unp_o.is_inf  = (exp_f == '1) && (frac_f == '0);
    unp_o.is_nan  = (exp_f == '1) && (frac_f != '0);
    unp_o.sig     = (exp_f == '0) ? '0 : {1'b1, frac_f};
  end

endmodule
