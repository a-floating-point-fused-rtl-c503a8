// Workload testbench: radix-2 decimation-in-frequency FFT butterfly.
//
//   x = a + b,   y = (a - b) * w
//
// Fused flow (on fdp_top): four addition-only operations for x and t = a - b,
// then two dot products, y_re = t_re*w_re - t_im*w_im and
// y_im = t_re*w_im + t_im*w_re, each rounded once.
// Discrete flow (also on fdp_top, through its multiplication-only and
// addition-only modes, so each step is an individually rounded single-
// precision multiply or add): four products, then an add and a subtract.
// Every unit operation is checked against the exact-arithmetic reference
// model and must complete one cycle after issue. Both flows are compared
// with the butterfly in double precision; the fused flow's error range must
// not exceed the discrete flow's, and its y errors must be smaller on
// average. Inputs are uniform in [-1, 1); twiddles are exp(-2*pi*i*k/1024).
module tb_fdp_fft_butterfly;
  import fdp_pkg::*;
  import fdp_ref_pkg::*;

  localparam int NBFLY = 4000;
  localparam real PI = 3.14159265358979323846;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, op_sub = 1'b0, y_valid;
  logic [1:0]  mode = '0;
  logic [31:0] a = '0, b = '0, c = '0, d = '0, y;
  logic [3:0]  flags;
  int checks = 0, failures = 0;

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

  // One unit operation: issue at a falling edge, read one cycle later.
  task automatic fdp_op(input logic [31:0] ta, tb, tc, td, input logic tsub,
                        input fdp_mode_e tm, output logic [31:0] res);
    logic [31:0] want;
    @(negedge clk);
    a = ta; b = tb; c = tc; d = td; op_sub = tsub; mode = 2'(tm); in_valid = 1'b1;
    want = ref_fdp(ta, tb, tc, td, tsub, 2'(tm));
    @(negedge clk);
    in_valid = 1'b0;
    res = y;
    checks++;
    if (!y_valid || y !== want) begin
      failures++;
      if (failures < 5) $display("op mismatch: got %h (valid %0b) expected %h", y, y_valid, want);
    end
  endtask

  // double -> single, round to nearest even (normal range only; 0 -> +0)
  function automatic logic [31:0] to_sp(input real r);
    logic [63:0] bits;
    logic [52:0] m;
    logic [24:0] k;
    int          e;
    logic        g, st;
    if (r == 0.0) return 32'd0;
    bits = $realtobits(r);
    e  = int'(bits[62:52]) - 1023 + 127;
    m  = {1'b1, bits[51:0]};
    k  = {1'b0, m[52:29]};
    g  = m[28];
    st = |m[27:0];
    k  = k + {24'd0, g & (st | k[0])};
    if (k[24]) begin
      k = k >> 1;
      e++;
    end
    return {bits[63], 8'(e), k[22:0]};
  endfunction

  // single -> double (normal numbers and zero)
  function automatic real to_r(input logic [31:0] w);
    if (w[30:23] == 0) return 0.0;
    return $bitstoreal({w[31], 11'(int'(w[30:23]) - 127 + 1023), w[22:0], 29'd0});
  endfunction

  function automatic real urand();
    return (real'($urandom) / 4294967296.0) * 2.0 - 1.0;
  endfunction

  localparam logic [31:0] ONE = 32'h3F800000;

  initial begin
    automatic real fmin = 0.0, fmax = 0.0, dmin = 0.0, dmax = 0.0, fsum = 0.0, dsum = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NBFLY; n++) begin
      automatic logic [31:0] are, aim, bre, bim, wre, wim;
      automatic logic [31:0] xre, xim, tre, tim, yre, yim, p1, p2, p3, p4, dyre, dyim;
      automatic real ang, ref_re, ref_im, e;
      automatic int  k;
      are = to_sp(urand()); aim = to_sp(urand());
      bre = to_sp(urand()); bim = to_sp(urand());
      k   = int'($urandom % 1024);
      ang = -2.0 * PI * real'(k) / 1024.0;
      wre = to_sp($cos(ang)); wim = to_sp($sin(ang));

      // fused flow: 4 additions, 2 dot products
      fdp_op(are, ONE, bre, ONE, 1'b0, MODE_ADD, xre);
      fdp_op(aim, ONE, bim, ONE, 1'b0, MODE_ADD, xim);
      fdp_op(are, ONE, bre, ONE, 1'b1, MODE_ADD, tre);
      fdp_op(aim, ONE, bim, ONE, 1'b1, MODE_ADD, tim);
      fdp_op(tre, wre, tim, wim, 1'b1, MODE_DOT, yre);
      fdp_op(tre, wim, tim, wre, 1'b0, MODE_DOT, yim);
      // discrete flow: 4 multiplications, 2 additions
      fdp_op(ONE, ONE, tre, wre, 1'b0, MODE_MUL, p1);
      fdp_op(ONE, ONE, tim, wim, 1'b0, MODE_MUL, p2);
      fdp_op(ONE, ONE, tre, wim, 1'b0, MODE_MUL, p3);
      fdp_op(ONE, ONE, tim, wre, 1'b0, MODE_MUL, p4);
      fdp_op(p1, ONE, p2, ONE, 1'b1, MODE_ADD, dyre);
      fdp_op(p3, ONE, p4, ONE, 1'b0, MODE_ADD, dyim);

      // double-precision butterfly from the same single-precision inputs
      ref_re = (to_r(are) - to_r(bre)) * to_r(wre) - (to_r(aim) - to_r(bim)) * to_r(wim);
      ref_im = (to_r(are) - to_r(bre)) * to_r(wim) + (to_r(aim) - to_r(bim)) * to_r(wre);
      checks++;
      if (xre !== to_sp(to_r(are) + to_r(bre)) || xim !== to_sp(to_r(aim) + to_r(bim))) begin
        failures++;
        $display("x mismatch");
      end
      e = to_r(yre) - ref_re; if (e < fmin) fmin = e; if (e > fmax) fmax = e; fsum += (e < 0 ? -e : e);
      e = to_r(yim) - ref_im; if (e < fmin) fmin = e; if (e > fmax) fmax = e; fsum += (e < 0 ? -e : e);
      e = to_r(dyre) - ref_re; if (e < dmin) dmin = e; if (e > dmax) dmax = e; dsum += (e < 0 ? -e : e);
      e = to_r(dyim) - ref_im; if (e < dmin) dmin = e; if (e > dmax) dmax = e; dsum += (e < 0 ? -e : e);
    end
    $display("fused    error range [%e, %e], mean |error| %e", fmin, fmax, fsum / (2.0 * NBFLY));
    $display("discrete error range [%e, %e], mean |error| %e", dmin, dmax, dsum / (2.0 * NBFLY));
    checks += 2;
    if (fmax - fmin > dmax - dmin) failures++;
    if (fsum >= dsum) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
