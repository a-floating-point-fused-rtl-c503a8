// Testbench of the aligner: random carry-save products, selection and
// shift distances on both sides of ALIGN_EXT and the multiplication-only
// bypass. The placed vectors are checked against the window layout, and the
// value of the smaller pair against the product shifted right (or the single
// sticky one beyond ALIGN_EXT).
module tb_fdp_align;
  import fdp_pkg::*;

  cs_prod_t ab, cd;
  logic zab, zcd, abb, mul, sticky;
  logic [SHIFT_W-1:0] sh;
  logic [WIN_W-1:0] bs, bc, ss, sc;
  int checks = 0, failures = 0;

  fdp_align dut (
    .ab_i(ab), .cd_i(cd), .ab_zero_i(zab), .cd_zero_i(zcd), .ab_bigger_i(abb),
    .shift_i(sh), .mul_only_i(mul), .big_s_o(bs), .big_c_o(bc), .sml_s_o(ss),
    .sml_c_o(sc), .sticky_o(sticky)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs_prod_t big, sml;
    logic     szero, ok;
    logic [WIN_W-1:0] e_bs, e_bc, e_ss, e_sc;
    repeat (5000) begin
      ab  = '{s: PROD_W'({$urandom, $urandom}), c: PROD_W'({$urandom, $urandom})};
      cd  = '{s: PROD_W'({$urandom, $urandom}), c: PROD_W'({$urandom, $urandom})};
      zab = ($urandom % 8) == 0; zcd = ($urandom % 8) == 0;
      abb = 1'($urandom); mul = ($urandom % 8) == 0;
      sh  = SHIFT_W'($urandom % 120);
      #1;
      big   = (mul || !abb) ? cd : ab;
      sml   = mul ? '0 : (abb ? cd : ab);
      szero = mul ? 1'b1 : (abb ? zcd : zab);
      e_bs = WIN_W'(big.s) << ALIGN_EXT;
      e_bc = WIN_W'(big.c) << ALIGN_EXT;
      if (mul) begin
        e_ss = '0; e_sc = '0;
      end else if (int'(sh) <= ALIGN_EXT) begin
        e_ss = WIN_W'(sml.s) << (ALIGN_EXT - int'(sh));
        e_sc = WIN_W'(sml.c) << (ALIGN_EXT - int'(sh));
      end else begin
        e_ss = WIN_W'(!szero); e_sc = '0;
      end
      ok = (bs == e_bs) && (bc == e_bc) && (ss == e_ss) && (sc == e_sc) &&
           (sticky == (!mul && int'(sh) > ALIGN_EXT && !szero));
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 5) $display("MISMATCH shift=%0d abb=%0b mul=%0b", sh, abb, mul);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
