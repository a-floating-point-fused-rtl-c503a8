// Leading-zero anticipator (LZA).
//
// Works on the two inputs of the carry-propagate adder, in parallel with it,
// and predicts how far the magnitude of their two's-complement sum must be
// shifted left to bring its leading one to bit WIN_W-2. The sum's magnitude
// never reaches bit WIN_W-2 (the window has two sign bits), which keeps the
// prediction within one position of the truth. Per bit it forms
// t = a^b, g = a&b, z = ~a&~b and the indicator
//   f[i] = t[i+1] & (g[i] & ~z[i-1] | z[i] & ~g[i-1])
//        | ~t[i+1] & (z[i] & ~z[i-1] | g[i] & ~g[i-1])
// (bit -1 is taken as a = b = 0), which marks the first digit that differs
// from the sign, for positive and negative sums alike. The highest set f[i]
// is within one position of the leading one of the magnitude; the rounder
// removes that last bit of error. lz_o = WIN_W when no indicator is set,
// which happens for sums of 0 and -1; -1 cannot occur in the unit, whose
// sums are zero or at least 2^(ALIGN_EXT-1) in magnitude.
// The published design places an LZA beside the adder but does not describe
// it; the indicator above is a standard method chosen here. Purely
// combinational.
module fdp_lza
  import fdp_pkg::*;
(
  input  logic [WIN_W-1:0] a_i,
  input  logic [WIN_W-1:0] b_i,
  output logic [LZ_W-1:0]  lz_o
);

  logic [WIN_W:0]   t, g, z;      // index 0 is the virtual bit -1
  logic [WIN_W-2:0] f;

  always_comb begin
    t = {a_i ^ b_i, 1'b0};
    g = {a_i & b_i, 1'b0};
    z = {~a_i & ~b_i, 1'b1};
    for (int i = 0; i <= WIN_W - 2; i++) begin
      // window bit i is index i+1; bit i+1 is i+2; bit i-1 is i
      f[i] = ( t[i+2] & ((g[i+1] & ~z[i]) | (z[i+1] & ~g[i])))
           | (~t[i+2] & ((z[i+1] & ~z[i]) | (g[i+1] & ~g[i])));
    end
    lz_o = LZ_W'(WIN_W);
    for (int i = 0; i <= WIN_W - 2; i++) begin
      if (f[i]) lz_o = LZ_W'(WIN_W - 2 - i);
    end
  end

endmodule
