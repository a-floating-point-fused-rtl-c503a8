// 4:2 carry-save reduction of the two aligned products.
//
// Four window-wide vectors (sum and carry of each product) and two carry-in
// bits are reduced to one sum and one carry vector, built as two rows of 3:2
// compressors. The carry-ins fill bit 0 of each row's carry vector, which a
// shifted carry leaves empty. sum_o + carry_o equals the sum of all inputs
// modulo 2^WIN_W, which is exact for the window's two's-complement range.
// The 4:2 stage is the published design's; its construction from two 3:2
// rows is this design's choice. Purely combinational.
module fdp_csa42
  import fdp_pkg::*;
(
  input  logic [WIN_W-1:0] x0_i,
  input  logic [WIN_W-1:0] x1_i,
  input  logic [WIN_W-1:0] x2_i,
  input  logic [WIN_W-1:0] x3_i,
  input  logic [1:0]       cin_i,
  output logic [WIN_W-1:0] sum_o,
  output logic [WIN_W-1:0] carry_o
);

  logic [WIN_W-1:0] s1, c1, m1, m2;

  always_comb begin
    s1      = x0_i ^ x1_i ^ x2_i;
    m1      = (x0_i & x1_i) | (x0_i & x2_i) | (x1_i & x2_i);
    c1      = {m1[WIN_W-2:0], cin_i[0]};
    sum_o   = s1 ^ c1 ^ x3_i;
    m2      = (s1 & c1) | (s1 & x3_i) | (c1 & x3_i);
    carry_o = {m2[WIN_W-2:0], cin_i[1]};
  end

endmodule
