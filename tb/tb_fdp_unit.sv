// Self-checking testbench of the combinational fused dot-product core.
//
// Drives fdp_unit with directed cases (exact cancellation, rounding ties,
// overflow, underflow, special values, the addition-only and
// multiplication-only modes) and with random operands of three kinds: close
// exponents (heavy cancellation, complemented results), wide exponent spread
// (the smaller product collapsing into a sticky bit) and the full range.
// Every result is compared with the exact-arithmetic reference model.
// Counts how often each mechanism (swap, effective subtraction, sticky,
// negative adder result) was exercised and fails if one never was.
module tb_fdp_unit;
  import fdp_pkg::*;
  import fdp_ref_pkg::*;

  logic [31:0] a, b, c, d, y, exp_y;
  logic        op_sub, ab_bigger, eff_sub, sticky, neg_result;
  fdp_mode_e   mode;
  int checks = 0, failures = 0;
  int n_swap = 0, n_sub = 0, n_sticky = 0, n_neg = 0;

  fdp_unit dut (
    .a_i(a), .b_i(b), .c_i(c), .d_i(d), .op_sub_i(op_sub), .mode_i(mode),
    .y_o(y), .ab_bigger_o(ab_bigger), .eff_sub_o(eff_sub),
    .sticky_o(sticky), .neg_result_o(neg_result)
  );

  task automatic run(input logic [31:0] ta, tb, tc, td, input logic top, input fdp_mode_e tm);
    a = ta; b = tb; c = tc; d = td; op_sub = top; mode = tm;
    #1;
    exp_y = ref_fdp(ta, tb, tc, td, top, tm);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures <= 10)
        $display("MISMATCH mode=%0d sub=%0b a=%h b=%h c=%h d=%h y=%h expected=%h",
                 tm, top, ta, tb, tc, td, y, exp_y);
    end
    if (tm == MODE_DOT) begin
      if (!ab_bigger) n_swap++;
      if (eff_sub) n_sub++;
      if (sticky) n_sticky++;
      if (neg_result) n_neg++;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1.5*2 + 3*0.5 = 4.5
    run(32'h3FC00000, 32'h40000000, 32'h40400000, 32'h3F000000, 0, MODE_DOT);
    // exact cancellation: 3*5 - 5*3 = +0
    run(32'h40400000, 32'h40A00000, 32'h40A00000, 32'h40400000, 1, MODE_DOT);
    // both products -0: (-0)*1 + (-0)*1 = -0
    run(32'h80000000, 32'h3F800000, 32'h80000000, 32'h3F800000, 0, MODE_DOT);
    // overflow to +Inf
    run(32'h7F000000, 32'h7F000000, 32'h3F800000, 32'h3F800000, 0, MODE_DOT);
    // underflow flushed
    run(32'h00800000, 32'h3F000000, 32'h00000000, 32'h3F800000, 0, MODE_DOT);
    // Inf*0 -> NaN, Inf - Inf -> NaN, Inf + finite
    run(32'h7F800000, 32'h00000000, 32'h3F800000, 32'h3F800000, 0, MODE_DOT);
    run(32'h7F800000, 32'h3F800000, 32'h7F800000, 32'h3F800000, 1, MODE_DOT);
    run(32'h3F800000, 32'hFF800000, 32'h3F800000, 32'h3F800000, 0, MODE_DOT);
    run(32'h7FC12345, 32'h3F800000, 32'h3F800000, 32'h3F800000, 0, MODE_DOT);
    // tie cases: 1 + 2^-24 (tie, even stays), 1 + 3*2^-24 (tie, rounds up)
    run(32'h3F800000, 32'h3F800000, 32'h33800000, 32'h3F800000, 0, MODE_DOT);
    run(32'h3F800000, 32'h3F800000, 32'h34400000, 32'h3F800000, 0, MODE_DOT);
    // 1 - tiny (sticky subtraction)
    run(32'h3F800000, 32'h3F800000, 32'h20000000, 32'h20000000, 1, MODE_DOT);
    // forwarding modes
    run(32'h3FC00000, 32'h12345678, 32'h40400000, 32'h7F800000, 0, MODE_ADD);
    run(32'h40400000, 32'h3F800000, 32'h40400000, 32'h3F800000, 1, MODE_ADD);
    run(32'h7FC00001, 32'h7F800000, 32'h40400000, 32'hC0000000, 0, MODE_MUL);
    run(32'h3F800000, 32'h3F800000, 32'h00000000, 32'hC0000000, 1, MODE_MUL);

    repeat (20000) run(rand_fp(120, 134), rand_fp(120, 134), rand_fp(120, 134), rand_fp(120, 134),
                       1'($urandom), MODE_DOT);
    repeat (20000) run(rand_fp(60, 190), rand_fp(60, 190), rand_fp(60, 190), rand_fp(60, 190),
                       1'($urandom), MODE_DOT);
    repeat (10000) run(rand_fp(0, 255), rand_fp(0, 255), rand_fp(0, 255), rand_fp(0, 255),
                       1'($urandom), MODE_DOT);
    // products with nearly equal magnitude: c*d ~ a*b
    repeat (20000) begin
      logic [31:0] ra, rb;
      ra = rand_fp(110, 140);
      rb = rand_fp(110, 140);
      run(ra, rb, {1'($urandom), ra[30:0] ^ 31'($urandom % 8)}, {rb[31], rb[30:0] ^ 31'($urandom % 4)},
          1'($urandom), MODE_DOT);
    end
    repeat (5000) run(rand_fp(100, 150), rand_fp(0, 255), rand_fp(100, 150), rand_fp(0, 255),
                      1'($urandom), MODE_ADD);
    repeat (5000) run(rand_fp(0, 255), rand_fp(0, 255), rand_fp(0, 255), rand_fp(0, 255),
                      1'($urandom), MODE_MUL);
    repeat (5000) run(rand_fp(0, 255), $urandom, rand_fp(0, 255), $urandom, 1'($urandom), MODE_ADD);
    repeat (5000) run(rand_fp(120, 134), $urandom, rand_fp(120, 134), $urandom, 1'($urandom), MODE_ADD);

    $display("mechanisms: swap=%0d eff_sub=%0d sticky=%0d negative=%0d", n_swap, n_sub, n_sticky, n_neg);
    checks += 4;
    if (n_swap == 0) failures++;
    if (n_sub == 0) failures++;
    if (n_sticky == 0) failures++;
    if (n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
