// Significand multiplier tree: 24 x 24 bits, result in carry-save form.
//
// The 24 partial products a & {48{b[i]}} << i are reduced by rows of 3:2
// carry-save adders (24 -> 16 -> 11 -> 8 -> 6 -> 4 -> 3 -> 2 vectors) with no
// carry-propagate adder at the end; the two remaining vectors are handed to
// the alignment and 4:2 reduction logic. All vectors are non-negative and the
// reduction conserves their sum, so no vector ever exceeds the product
// (< 2^48): sum_o + carry_o equals a_i * b_i exactly, without wrap-around,
// which is what allows the pair to be shifted into a wider window.
// Two such trees, with carry-save outputs, are the published design's; the
// Wallace-style row structure is this design's choice. Purely combinational.
module fdp_mult_tree
  import fdp_pkg::*;
(
  input  logic [SIG_W-1:0]  a_i,
  input  logic [SIG_W-1:0]  b_i,
  output logic [PROD_W-1:0] sum_o,
  output logic [PROD_W-1:0] carry_o
);

  // Number of vectors left after one row of 3:2 compressors.
  function automatic int unsigned next_cnt(int unsigned n);
    return (n / 3) * 2 + (n % 3);
  endfunction

  function automatic int unsigned cnt_at(int unsigned lvl);
    int unsigned n = SIG_W;
    for (int unsigned i = 0; i < lvl; i++) n = next_cnt(n);
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = SIG_W;
    int unsigned l = 0;
    while (n > 2) begin
      n = next_cnt(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NLEV = num_levels();

  logic [PROD_W-1:0] pp [SIG_W];

  // Partial products.
  for (genvar i = 0; i < SIG_W; i++) begin : g_pp
    assign pp[i] = b_i[i] ? (PROD_W'(a_i) << i) : '0;
  end

  // One row of 3:2 compressors per level; g_lvl[l].vout holds its vectors.
  for (genvar l = 0; l < NLEV; l++) begin : g_lvl
    localparam int unsigned N = cnt_at(l);
    localparam int unsigned G = N / 3;
    localparam int unsigned M = next_cnt(N);
    logic [PROD_W-1:0] vin  [N];
    logic [PROD_W-1:0] vout [M];
    if (l == 0) begin : g_first
      for (genvar k = 0; k < N; k++) begin : g_k
        assign vin[k] = pp[k];
      end
    end else begin : g_next
      for (genvar k = 0; k < N; k++) begin : g_k
        assign vin[k] = g_lvl[l-1].vout[k];
      end
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      logic [PROD_W-1:0] x, y, z, maj;
      assign x = vin[3*g];
      assign y = vin[3*g+1];
      assign z = vin[3*g+2];
      assign vout[2*g] = x ^ y ^ z;
      assign maj       = (x & y) | (x & z) | (y & z);
      // maj[PROD_W-1] is always zero: every vector stays below the product.
      assign vout[2*g+1] = {maj[PROD_W-2:0], 1'b0};
    end
    for (genvar r = 0; r < N % 3; r++) begin : g_pass
      assign vout[2*G+r] = vin[3*G+r];
    end
  end

  assign sum_o   = g_lvl[NLEV-1].vout[0];
  assign carry_o = g_lvl[NLEV-1].vout[1];

endmodule
