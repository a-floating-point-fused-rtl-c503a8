// Testbench of round and post-normalise. A random significand-plus-tail is
// built with its leading one at bit WIN_W-1, WIN_W-2 or WIN_W-3 (the three
// positions the anticipator can leave it at), together with a count; the
// expected 24-bit rounded significand, exponent adjustment and packed
// result are computed here with integer rounding to nearest-even. Ties,
// all-ones significands (rounding carry), overflow, underflow, zero and
// special-value packing are included.
module tb_fdp_round;
  import fdp_pkg::*;

  logic [WIN_W-1:0] norm;
  logic [LZ_W-1:0]  lz;
  logic sign, zsign, nan, inf, isign;
  logic signed [ADJ_W-1:0]  adj;
  logic signed [PEXP_W-1:0] rexp;
  logic [31:0] y;
  int checks = 0, failures = 0, n_carry = 0, n_tie = 0;
  localparam int ADJ0 = int'(WIN_W) - int'(PROD_W) - int'(ALIGN_EXT);

  fdp_round dut (
    .norm_i(norm), .lz_i(lz), .sign_i(sign), .zero_sign_i(zsign), .nan_i(nan),
    .inf_i(inf), .inf_sign_i(isign), .exp_adjust_o(adj), .result_exp_i(rexp), .result_o(y)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int pos, input logic [23:0] sig, input int tail_kind);
    logic [WIN_W-1:0] v;
    int    k, want_adj, e;
    logic  g, st, up;
    logic [24:0] r;
    logic [31:0] want;
    v = '0;
    v[pos -: 24] = sig;
    v[pos] = 1'b1;
    // bits below the significand
    for (int i = 0; i <= pos - 24; i++) v[i] = 1'($urandom);
    if (tail_kind == 1) begin v[pos-24] = 1'b1; for (int i = 0; i < pos - 24; i++) v[i] = 1'b0; end
    if (tail_kind == 2) v[pos-24] = 1'b0;
    norm = v; lz = LZ_W'($urandom % WIN_W); sign = 1'($urandom);
    zsign = 1'($urandom); nan = 1'b0; inf = 1'b0; isign = 1'b0;
    #1;
    g  = v[pos-24];
    st = 1'b0;
    for (int i = 0; i < pos - 24; i++) st |= v[i];
    r  = {1'b0, v[pos -: 24]};
    up = g & (st | r[0]);
    if (g && !st) n_tie++;
    r  = r + 25'(up);
    k  = r[24] ? 1 : 0;
    if (k == 1) n_carry++;
    want_adj = ADJ0 - int'(lz) + (pos - (WIN_W - 2)) + k;
    checks++;
    if (int'(adj) != want_adj) begin
      failures++;
      if (failures < 5) $display("ADJ MISMATCH pos=%0d lz=%0d got=%0d want=%0d", pos, lz, adj, want_adj);
    end
    // pack with a random in-range, overflowing or underflowing exponent
    e = int'($urandom % 300) - 20;
    rexp = PEXP_W'(e);
    #1;
    if (e >= 255) want = {sign, 8'hFF, 23'd0};
    else if (e <= 0) want = {sign, 31'd0};
    else want = {sign, 8'(e), (k != 0) ? r[23:1] : r[22:0]};
    checks++;
    if (y !== want) begin
      failures++;
      if (failures < 5) $display("PACK MISMATCH pos=%0d e=%0d got=%h want=%h", pos, e, y, want);
    end
  endtask

  initial begin
    repeat (3000) run(WIN_W - 1 - int'($urandom % 3), 24'($urandom), int'($urandom % 3));
    repeat (200) run(WIN_W - 1 - int'($urandom % 3), 24'hFFFFFF, 1);
    repeat (200) run(WIN_W - 1 - int'($urandom % 3), 24'hFFFFFF, 0);
    // zero magnitude, NaN and infinity
    norm = '0; lz = LZ_W'(WIN_W); zsign = 1'b1; nan = 0; inf = 0; rexp = 100;
    #1; checks++; if (y !== 32'h80000000) failures++;
    zsign = 1'b0;
    #1; checks++; if (y !== 32'h00000000) failures++;
    norm = {3'b010, {(WIN_W-3){1'b0}}}; nan = 1;
    #1; checks++; if (y !== 32'h7FC00000) failures++;
    nan = 0; inf = 1; isign = 1;
    #1; checks++; if (y !== 32'hFF800000) failures++;
    $display("ties=%0d rounding_carries=%0d", n_tie, n_carry);
    checks += 2;
    if (n_tie == 0) failures++;
    if (n_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
