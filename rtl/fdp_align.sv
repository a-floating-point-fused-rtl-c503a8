// Alignment of the two carry-save products in the accumulation window.
//
// The window is WIN_W bits, two's complement: bits WIN_W-1 and WIN_W-2 are
// sign bits, bit WIN_W-3 is headroom for the carry of the sum, the bigger
// product occupies bits [WIN_W-4 : ALIGN_EXT] and ALIGN_EXT bits lie below it. The bigger
// product's sum and carry vectors are placed unshifted; the smaller
// product's are shifted right by the alignment distance. For distances up to
// ALIGN_EXT nothing is lost. For larger distances the smaller product lies
// wholly below the rounding position and is replaced by a single sticky one
// in bit 0 (set when that product is non-zero), which keeps rounding exact
// for addition and subtraction alike. Forwarding (mul_only_i) skips the
// shifter entirely: C*D is passed as the bigger product and the other
// product is zero. The published diagram shows an aligner on the C*D path
// only; swapping so that either product can be the shifted one, the window
// size and the sticky collapse are this design's choices. Purely
// combinational.
module fdp_align
  import fdp_pkg::*;
(
  input  cs_prod_t            ab_i,
  input  cs_prod_t            cd_i,
  input  logic                ab_zero_i,
  input  logic                cd_zero_i,
  input  logic                ab_bigger_i,
  input  logic [SHIFT_W-1:0]  shift_i,
  input  logic                mul_only_i,
  output logic [WIN_W-1:0]    big_s_o,
  output logic [WIN_W-1:0]    big_c_o,
  output logic [WIN_W-1:0]    sml_s_o,
  output logic [WIN_W-1:0]    sml_c_o,
  output logic                sticky_o     // smaller product collapsed to sticky
);

  cs_prod_t          big, sml;
  logic              sml_zero;
  logic [WIN_W-1:0]  sml_s_full, sml_c_full;

  always_comb begin
    if (mul_only_i) begin
      big      = cd_i;
      sml      = '0;
      sml_zero = 1'b1;
    end else if (ab_bigger_i) begin
      big      = ab_i;
      sml      = cd_i;
      sml_zero = cd_zero_i;
    end else begin
      big      = cd_i;
      sml      = ab_i;
      sml_zero = ab_zero_i;
    end

    big_s_o    = {{(WIN_W-PROD_W-ALIGN_EXT){1'b0}}, big.s, {ALIGN_EXT{1'b0}}};
    big_c_o    = {{(WIN_W-PROD_W-ALIGN_EXT){1'b0}}, big.c, {ALIGN_EXT{1'b0}}};
    sml_s_full = {{(WIN_W-PROD_W-ALIGN_EXT){1'b0}}, sml.s, {ALIGN_EXT{1'b0}}};
    sml_c_full = {{(WIN_W-PROD_W-ALIGN_EXT){1'b0}}, sml.c, {ALIGN_EXT{1'b0}}};

    if (mul_only_i || shift_i <= SHIFT_W'(ALIGN_EXT)) begin
      sml_s_o  = mul_only_i ? '0 : sml_s_full >> shift_i;
      sml_c_o  = mul_only_i ? '0 : sml_c_full >> shift_i;
      sticky_o = 1'b0;
    end else begin
      sml_s_o  = {{(WIN_W-1){1'b0}}, !sml_zero};
      sml_c_o  = '0;
      sticky_o = !sml_zero;
    end
  end

endmodule
