// Testbench of the normalising shifter: random magnitudes and counts,
// including counts of WIN_W and beyond, against a shift computed here.
module tb_fdp_normalize;
  import fdp_pkg::*;

  logic [WIN_W-1:0] m, n;
  logic [LZ_W-1:0]  lz;
  int checks = 0, failures = 0;

  fdp_normalize dut (.mag_i(m), .lz_i(lz), .norm_o(n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIN_W-1:0] want;
    repeat (3000) begin
      m  = WIN_W'({$urandom, $urandom, $urandom, $urandom});
      lz = LZ_W'($urandom);
      #1;
      want = '0;
      for (int i = 0; i < WIN_W; i++)
        if (i - int'(lz) >= 0) want[i] = m[i - int'(lz)];
      checks++;
      if (n !== want) begin
        failures++;
        if (failures < 5) $display("MISMATCH lz=%0d", lz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
