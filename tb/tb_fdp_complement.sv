// Testbench of the complement stage: random positive and negative window
// values; the magnitude and sign must match |x| and x < 0.
module tb_fdp_complement;
  import fdp_pkg::*;

  logic [WIN_W-1:0] x, mag;
  logic neg;
  int checks = 0, failures = 0;

  fdp_complement dut (.x_i(x), .mag_o(mag), .neg_o(neg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [WIN_W-1:0] v;
    repeat (3000) begin
      v = WIN_W'({$urandom, $urandom, $urandom, $urandom});
      v = v >>> ($urandom % WIN_W);
      x = v;
      #1;
      checks++;
      if (neg !== (v < 0) || mag !== ((v < 0) ? -v : v)) begin
        failures++;
        if (failures < 5) $display("MISMATCH x=%h mag=%h neg=%0b", x, mag, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
