// Carry-propagate adder of the fused dot-product unit.
//
// Adds the sum and carry vectors of the 4:2 reduction into the window-wide
// two's-complement dot-product (modulo 2^WIN_W). Written as a behavioural
// '+' so that synthesis picks the adder architecture, which the published
// design leaves open. Purely combinational.
module fdp_adder
  import fdp_pkg::*;
(
  input  logic [WIN_W-1:0] a_i,
  input  logic [WIN_W-1:0] b_i,
  output logic [WIN_W-1:0] sum_o
);

  assign sum_o = a_i + b_i;

endmodule
