// Testbench of the 4:2 carry-save reduction: for random inputs and carry-in
// bits, sum + carry must equal the sum of the four inputs and the carry-ins
// modulo 2^WIN_W.
module tb_fdp_csa42;
  import fdp_pkg::*;

  logic [WIN_W-1:0] x0, x1, x2, x3, so, co;
  logic [1:0] cin;
  int checks = 0, failures = 0;

  fdp_csa42 dut (.x0_i(x0), .x1_i(x1), .x2_i(x2), .x3_i(x3), .cin_i(cin),
                 .sum_o(so), .carry_o(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) begin
      x0 = WIN_W'({$urandom, $urandom, $urandom, $urandom});
      x1 = WIN_W'({$urandom, $urandom, $urandom, $urandom});
      x2 = WIN_W'({$urandom, $urandom, $urandom, $urandom});
      x3 = WIN_W'({$urandom, $urandom, $urandom, $urandom});
      cin = 2'($urandom);
      #1;
      checks++;
      if (so + co !== x0 + x1 + x2 + x3 + WIN_W'(cin[0]) + WIN_W'(cin[1])) begin
        failures++;
        if (failures < 5) $display("MISMATCH cin=%b", cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
