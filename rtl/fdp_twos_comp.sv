// Conditional two's-complement negation of the aligned smaller product.
//
// On an effective subtraction (the product signs, with the operation applied,
// differ) both carry-save vectors of the smaller product are inverted; the
// two +1s that complete the negation are returned as carry-in bits and
// injected into the free least-significant positions of the 4:2 reduction,
// so no incrementer is needed. The block and its place after the aligner
// are the published design's; the carry-in trick is this design's choice.
// Purely combinational.
module fdp_twos_comp
  import fdp_pkg::*;
(
  input  logic [WIN_W-1:0] s_i,
  input  logic [WIN_W-1:0] c_i,
  input  logic             negate_i,
  output logic [WIN_W-1:0] s_o,
  output logic [WIN_W-1:0] c_o,
  output logic [1:0]       cin_o      // each bit adds one at window bit 0
);

  always_comb begin
    s_o   = negate_i ? ~s_i : s_i;
    c_o   = negate_i ? ~c_i : c_i;
    cin_o = {negate_i, negate_i};
  end

endmodule
