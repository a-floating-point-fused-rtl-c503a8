// End-to-end testbench of the fused dot-product top level.
//
// Streams operations through fdp_top, one per clock with random idle
// cycles, mixing dot products (add and subtract), addition-only and
// multiplication-only operations and corner cases (cancellation to zero,
// overflow, underflow, NaN, infinity). Each result must appear exactly one
// cycle after its operands, with y_valid_o, and equal the exact-arithmetic
// reference. It counts how often each mechanism of the unit occurred:
// product swap, effective subtraction, sticky collapse of the smaller
// product, complemented (negative) adder result, both forwarding modes,
// overflow, underflow flush, NaN, exact cancellation, post-normalisation
// after a rounding carry and the anticipator's one-bit correction; one that never
// occurred is a failure. The top has no parameters, so this runs at full size.
module tb_fdp_top;
  import fdp_pkg::*;
  import fdp_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid, op_sub, y_valid;
  logic [1:0]  mode;
  logic [31:0] a, b, c, d, y;
  logic [3:0]  flags;
  int checks = 0, failures = 0, cycles = 0;

  // expected result of the operation issued in the previous cycle
  logic        pend_valid;
  logic [31:0] pend_y;
  logic [1:0]  pend_mode;

  int n_swap = 0, n_sub = 0, n_sticky = 0, n_neg = 0, n_add = 0, n_mul = 0;
  int n_ovf = 0, n_unf = 0, n_nan = 0, n_cancel = 0;
  int n_postnorm = 0, n_lza_low = 0, n_lza_high = 0;

  // Internal mechanisms of the rounder, sampled while an operation is
  // presented: post-normalisation after a rounding carry, and the one-bit
  // correction of the leading-zero anticipator (either direction).
  always @(posedge clk) begin
    if (rst_n && in_valid && !dut.u_fdp.u_round.is_zero) begin
      if (dut.u_fdp.u_round.sig_r[SIG_W]) n_postnorm++;
      if (dut.u_fdp.u_round.corr == 3'sd1) n_lza_low++;
      if (dut.u_fdp.u_round.corr == -3'sd1) n_lza_high++;
    end
  end

  fdp_top dut (
    .clk_i(clk), .rst_ni(rst_n), .in_valid_i(in_valid),
    .a_i(a), .b_i(b), .c_i(c), .d_i(d), .op_sub_i(op_sub), .mode_i(mode),
    .y_valid_o(y_valid), .y_o(y), .flags_o(flags)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operand generator for operation number k.
  task automatic pick(input int k);
    int kind;
    kind   = k % 10;
    op_sub = 1'($urandom);
    mode   = 2'(MODE_DOT);
    case (kind)
      0, 1, 2: begin
        a = rand_fp(110, 145); b = rand_fp(110, 145);
        c = rand_fp(110, 145); d = rand_fp(110, 145);
      end
      3: begin  // nearly cancelling products
        a = rand_fp(120, 134); b = rand_fp(120, 134);
        c = {1'($urandom), a[30:0] ^ 31'($urandom % 4)}; d = b;
      end
      4: begin  // wide spread: sticky
        a = rand_fp(150, 200); b = rand_fp(150, 200);
        c = rand_fp(40, 90);   d = rand_fp(40, 90);
      end
      5: begin mode = 2'(MODE_ADD); a = rand_fp(100, 150); b = $urandom; c = rand_fp(100, 150); d = $urandom; end
      6: begin mode = 2'(MODE_MUL); a = $urandom; b = $urandom; c = rand_fp(60, 190); d = rand_fp(60, 190); end
      7: begin  // overflow or underflow
        a = rand_fp(1, 254); b = rand_fp(1, 254); c = rand_fp(1, 254); d = rand_fp(1, 254);
      end
      8: begin  // exact cancellation, or NaN / infinity
        a = rand_fp(100, 150); b = rand_fp(100, 150);
        if ($urandom % 2 != 0) begin c = a; d = b; op_sub = 1'b1; end
        else begin c = 32'h7F800000; d = ($urandom % 2 != 0) ? 32'h0 : 32'h3F800000; end
      end
      default: begin
        a = $urandom; b = $urandom; c = $urandom; d = $urandom;
      end
    endcase
  endtask

  // Compare the registered outputs with the operation issued one cycle earlier.
  task automatic check_out();
    checks++;
    if (y_valid !== pend_valid) begin
      failures++;
      $display("valid mismatch at cycle %0d: got %0b expected %0b", cycles, y_valid, pend_valid);
    end else if (pend_valid) begin
      if (y !== pend_y) begin
        failures++;
        if (failures <= 10) $display("result mismatch: got %h expected %h", y, pend_y);
      end
      if (pend_mode == 2'(MODE_DOT)) begin
        if (!flags[0]) n_swap++;
        if (flags[1]) n_sub++;
        if (flags[2]) n_sticky++;
        if (flags[3]) n_neg++;
      end
      if (pend_mode == 2'(MODE_ADD)) n_add++;
      if (pend_mode == 2'(MODE_MUL)) n_mul++;
      if (y[30:0] == 31'h7F800000) n_ovf++;
      if (y == 32'h7FC00000) n_nan++;
    end
  endtask

  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    in_valid = 1'b0; a = '0; b = '0; c = '0; d = '0; op_sub = 1'b0; mode = '0;
    pend_valid = 1'b0; pend_y = '0; pend_mode = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 30000; k++) begin
      @(negedge clk);
      if (k > 0) check_out();
      in_valid = ($urandom % 8) != 0;
      if (in_valid) pick(k);
      pend_valid = in_valid;
      pend_mode  = mode;
      if (in_valid) begin
        pend_y = ref_fdp(a, b, c, d, op_sub, mode);
        if (mode == 2'(MODE_DOT) && pend_y[30:0] == 31'd0 && a[30:23] != 0 && b[30:23] != 0
            && c[30:23] != 0 && d[30:23] != 0) begin
          // zero result from non-zero products: cancellation or underflow
          if (c == a && d == b) n_cancel++;
          else n_unf++;
        end
      end
    end
    @(negedge clk);
    check_out();
    in_valid = 1'b0;
    pend_valid = 1'b0;
    @(negedge clk);
    check_out();
    $display("mechanisms: swap=%0d eff_sub=%0d sticky=%0d negative=%0d add_mode=%0d mul_mode=%0d",
             n_swap, n_sub, n_sticky, n_neg, n_add, n_mul);
    $display("            overflow=%0d underflow=%0d nan=%0d cancel=%0d", n_ovf, n_unf, n_nan, n_cancel);
    $display("            post_normalize=%0d lza_one_too_low=%0d lza_one_too_high=%0d",
             n_postnorm, n_lza_low, n_lza_high);
    checks += 12;
    if (n_postnorm == 0) failures++;
    if (n_lza_low + n_lza_high == 0) failures++;
    if (n_swap == 0)   failures++;
    if (n_sub == 0)    failures++;
    if (n_sticky == 0) failures++;
    if (n_neg == 0)    failures++;
    if (n_add == 0)    failures++;
    if (n_mul == 0)    failures++;
    if (n_ovf == 0)    failures++;
    if (n_unf == 0)    failures++;
    if (n_nan == 0)    failures++;
    if (n_cancel == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
