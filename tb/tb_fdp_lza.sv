// Testbench of the leading-zero anticipator: random input pairs whose sum
// stays inside the window's range (|sum| below 2^(WIN_W-2)), with many near
// cancellations. The anticipated position of the leading one must be within
// one of the true leading one of |a + b|, and both directions of error and
// the exact case must occur.
module tb_fdp_lza;
  import fdp_pkg::*;

  logic [WIN_W-1:0] a, b;
  logic [LZ_W-1:0]  lz;
  int checks = 0, failures = 0;
  int n_exact = 0, n_high = 0, n_low = 0;

  fdp_lza dut (.a_i(a), .b_i(b), .lz_o(lz));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [WIN_W-1:0] s, r;
    logic [WIN_W-1:0] m;
    int q, p;
    repeat (20000) begin
      // target sum r with |r| < 2^(WIN_W-2), split randomly into a + b
      r = WIN_W'({$urandom, $urandom, $urandom, $urandom});
      r = r >>> (2 + $urandom % (WIN_W - 2));
      // -1 (magnitude one at bit 0) has no indicator bit below it; the unit
      // never produces it, since its small sums are multiples of 2^(ALIGN_EXT-1)
      if (r == 0 || r == -1) r = 1;
      a = WIN_W'({$urandom, $urandom, $urandom, $urandom});
      b = r - a;
      #1;
      s = a + b;
      m = s[WIN_W-1] ? -s : s;
      q = 0;
      for (int i = 0; i < WIN_W; i++) if (m[i]) q = i;
      p = WIN_W - 2 - int'(lz);
      checks++;
      if (p == q) n_exact++;
      else if (p == q + 1) n_high++;
      else if (p == q - 1) n_low++;
      else begin
        failures++;
        if (failures < 5) $display("MISMATCH sum=%h true=%0d predicted=%0d", s, q, p);
      end
    end
    $display("exact=%0d one_high=%0d one_low=%0d", n_exact, n_high, n_low);
    checks += 3;
    if (n_exact == 0) failures++;
    if (n_high == 0) failures++;
    if (n_low == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
