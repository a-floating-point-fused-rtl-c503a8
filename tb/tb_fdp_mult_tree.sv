// Testbench of the carry-save multiplier tree: random and extreme 24-bit
// significands; the sum of the two output vectors must equal the product,
// and neither the vectors nor their sum may exceed 48 bits.
module tb_fdp_mult_tree;
  import fdp_pkg::*;

  logic [SIG_W-1:0]  a, b;
  logic [PROD_W-1:0] s, c;
  logic [PROD_W:0]   tot;
  int checks = 0, failures = 0;

  fdp_mult_tree dut (.a_i(a), .b_i(b), .sum_o(s), .carry_o(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [23:0] x, input logic [23:0] y);
    a = x; b = y;
    #1;
    tot = {1'b0, s} + {1'b0, c};
    checks++;
    if (tot !== (49'(x) * 49'(y))) begin
      failures++;
      $display("MISMATCH %h * %h: s=%h c=%h", x, y, s, c);
    end
  endtask

  initial begin
    check(24'hFFFFFF, 24'hFFFFFF); check(24'h800000, 24'h800000);
    check(24'hFFFFFF, 24'h800000); check(24'h0, 24'hFFFFFF);
    check(24'hAAAAAA, 24'h555555);
    repeat (5000) check(24'($urandom), 24'($urandom));
    repeat (1000) check({1'b1, 23'($urandom)}, {1'b1, 23'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
