// Normalising left shifter.
//
// Shifts the magnitude left by the leading-zero count anticipated by the
// LZA, so that its leading one lands at bit WIN_W-2, or one position either
// side of it when the anticipation is off by one (the rounder corrects
// that). A count of WIN_W or more gives zero. The published design names the
// stage; the single barrel shift is this design's choice. Purely
// combinational.
module fdp_normalize
  import fdp_pkg::*;
(
  input  logic [WIN_W-1:0] mag_i,
  input  logic [LZ_W-1:0]  lz_i,
  output logic [WIN_W-1:0] norm_o
);

  assign norm_o = (lz_i >= LZ_W'(WIN_W)) ? '0 : (mag_i << lz_i);

endmodule
