// Top level of the fused dot-product unit.
//
// The combinational fused dot-product core (fdp_unit) sits behind an output
// register: operands, operation and mode presented with in_valid_i are
// sampled by the core and the rounded result appears in y_o with y_valid_o
// one clock later. A new operation can start every cycle. The register and
// the valid flag are this design's own framing; the document gives the unit
// as a single combinational path. Reset is synchronous and active low and
// clears the valid flag and the result. An assertion checks the one-cycle
// latency.
module fdp_top
  import fdp_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        in_valid_i,
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  input  logic [31:0] c_i,
  input  logic [31:0] d_i,
  input  logic        op_sub_i,
  input  logic [1:0]  mode_i,       // fdp_mode_e encoding
  output logic        y_valid_o,
  output logic [31:0] y_o,
  output logic [3:0]  flags_o       // {neg_result, sticky, eff_sub, ab_bigger} of y_o
);

  logic [31:0] y_d;
  logic        ab_bigger, eff_sub, sticky, neg_result;

  fdp_unit u_fdp (
    .a_i(a_i), .b_i(b_i), .c_i(c_i), .d_i(d_i),
    .op_sub_i(op_sub_i), .mode_i(fdp_mode_e'(mode_i)),
    .y_o(y_d),
    .ab_bigger_o(ab_bigger), .eff_sub_o(eff_sub),
    .sticky_o(sticky), .neg_result_o(neg_result)
  );

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      y_valid_o <= 1'b0;
      y_o       <= '0;
      flags_o   <= '0;
    end else begin
      y_valid_o <= in_valid_i;
      if (in_valid_i) begin
        y_o     <= y_d;
        flags_o <= {neg_result, sticky, eff_sub, ab_bigger};
      end
    end
  end

  // Every accepted operation produces a result in the following cycle.
  a_latency: assert property (@(posedge clk_i) disable iff (!rst_ni) in_valid_i |=> y_valid_o)
    else $error("result missing one cycle after in_valid_i");

endmodule
