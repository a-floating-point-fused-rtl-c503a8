// Testbench of the operand preprocessor: directed zero, subnormal, infinity,
// NaN and normal operands plus random words, each field compared with values
// decoded here from the IEEE-754 layout.
module tb_fdp_unpack;
  import fdp_pkg::*;

  logic [31:0]  op;
  fp_unpacked_t u;
  int checks = 0, failures = 0;

  fdp_unpack dut (.op_i(op), .unp_o(u));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] w);
    logic [7:0] e;
    logic [22:0] f;
    logic ez, en, ei;
    op = w;
    #1;
    e  = w[30:23];
    f  = w[22:0];
    ez = (e == 8'd0);
    ei = (e == 8'd255) && (f == 23'd0);
    en = (e == 8'd255) && (f != 23'd0);
    checks++;
    if (u.sign !== w[31] || u.exp !== e || u.is_zero !== ez || u.is_inf !== ei ||
        u.is_nan !== en || u.sig !== (ez ? 24'd0 : {1'b1, f})) begin
      failures++;
      $display("MISMATCH op=%h got %p", w, u);
    end
  endtask

  initial begin
    check(32'h00000000); check(32'h80000000); check(32'h00400001);
    check(32'h7F800000); check(32'hFF800000); check(32'h7FC00000);
    check(32'h3F800000); check(32'hC0490FDB);
    repeat (2000) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
