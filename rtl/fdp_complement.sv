// Complement stage: sign and magnitude of the adder result.
//
// The adder result is two's complement; when its sign bit is set the value
// is negated so that the normaliser and rounder work on a magnitude, and the
// sign is reported so the result sign can be corrected (the smaller-exponent
// product can be the larger one in magnitude when the exponents are within
// one of each other). The stage is the published design's; full negation
// (rather than an end-around-carry scheme) is this design's choice. Purely
// combinational.
module fdp_complement
  import fdp_pkg::*;
(
  input  logic [WIN_W-1:0] x_i,
  output logic [WIN_W-1:0] mag_o,
  output logic             neg_o
);

  always_comb begin
    neg_o = x_i[WIN_W-1];
    mag_o = neg_o ? (~x_i + 1'b1) : x_i;
  end

endmodule
