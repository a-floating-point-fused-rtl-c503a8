// Testbench of the 2's-complement stage: for random vector pairs, the
// outputs plus the two carry-in bits must equal the pair when not negating
// and minus the pair (modulo 2^WIN_W) when negating.
module tb_fdp_twos_comp;
  import fdp_pkg::*;

  logic [WIN_W-1:0] s, c, so, co;
  logic neg;
  logic [1:0] cin;
  int checks = 0, failures = 0;

  fdp_twos_comp dut (.s_i(s), .c_i(c), .negate_i(neg), .s_o(so), .c_o(co), .cin_o(cin));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIN_W-1:0] got, want;
    repeat (3000) begin
      s = WIN_W'({$urandom, $urandom, $urandom, $urandom});
      c = WIN_W'({$urandom, $urandom, $urandom, $urandom});
      neg = 1'($urandom);
      #1;
      got  = so + co + WIN_W'(cin[0]) + WIN_W'(cin[1]);
      want = neg ? -(s + c) : (s + c);
      checks++;
      if (got !== want) begin
        failures++;
        if (failures < 5) $display("MISMATCH neg=%0b", neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
