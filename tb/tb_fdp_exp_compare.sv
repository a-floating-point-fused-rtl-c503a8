// Testbench of the exponent compare circuit: random exponent quadruples,
// zero-product flags and rounder adjustments; the selection, alignment
// shift, bigger exponent and result exponent are recomputed here with
// integer arithmetic.
module tb_fdp_exp_compare;
  import fdp_pkg::*;

  logic [7:0] ea, eb, ec, ed;
  logic       zab, zcd, ab_big;
  logic signed [ADJ_W-1:0]  adj;
  logic [SHIFT_W-1:0]       shift;
  logic signed [PEXP_W-1:0] big, res;
  int checks = 0, failures = 0;

  fdp_exp_compare dut (
    .ea_i(ea), .eb_i(eb), .ec_i(ec), .ed_i(ed), .ab_zero_i(zab), .cd_zero_i(zcd),
    .exp_adjust_i(adj), .ab_bigger_o(ab_big), .align_shift_o(shift),
    .big_exp_o(big), .result_exp_o(res)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pab, pcd, eb_i, es_i, r;
    logic exp_big;
    repeat (5000) begin
      ea = 8'($urandom % 254 + 1); eb = 8'($urandom % 254 + 1);
      ec = 8'($urandom % 254 + 1); ed = 8'($urandom % 254 + 1);
      zab = ($urandom % 10) == 0; zcd = ($urandom % 10) == 0;
      adj = ADJ_W'(int'($urandom % 105) - 100);
      #1;
      pab = int'(ea) + int'(eb) - 127;
      pcd = int'(ec) + int'(ed) - 127;
      exp_big = zcd || (!zab && pab >= pcd);
      eb_i = exp_big ? pab : pcd;
      es_i = exp_big ? pcd : pab;
      r = eb_i + int'(adj);
      checks++;
      if (ab_big !== exp_big || int'(big) != eb_i || int'(res) != r ||
          (eb_i >= es_i && int'(shift) != eb_i - es_i)) begin
        failures++;
        $display("MISMATCH e=%0d %0d %0d %0d z=%0b%0b: big=%0b/%0b shift=%0d exp=%0d/%0d res=%0d/%0d",
                 ea, eb, ec, ed, zab, zcd, ab_big, exp_big, shift, big, eb_i, res, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
