// Testbench of the carry-propagate adder: random operands (including all
// ones plus one, which ripples the full width); the result must equal the
// sum computed here modulo 2^WIN_W.
module tb_fdp_adder;
  import fdp_pkg::*;

  logic [WIN_W-1:0] a, b, s;
  int checks = 0, failures = 0;

  fdp_adder dut (.a_i(a), .b_i(b), .sum_o(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIN_W-1:0] x, input logic [WIN_W-1:0] y);
    logic [WIN_W:0] want;
    a = x; b = y;
    #1;
    want = {1'b0, x} + {1'b0, y};
    checks++;
    if (s !== want[WIN_W-1:0]) begin
      failures++;
      if (failures < 5) $display("MISMATCH %h + %h = %h", x, y, s);
    end
  endtask

  initial begin
    check('1, WIN_W'(1));
    check('0, '0);
    repeat (3000) check(WIN_W'({$urandom, $urandom, $urandom, $urandom}), WIN_W'({$urandom, $urandom, $urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
