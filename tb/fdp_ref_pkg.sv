// Reference model for the fused dot-product testbenches.
//
// Computes A*B +/- C*D (or A +/- C, or +/-C*D) exactly with wide integers,
// independently of the unit's structure: both products are formed as plain
// 48-bit integers, brought to a common exponent by shifting the one with the
// larger exponent left (no window, no sticky), added as signed 640-bit
// integers, then rounded to nearest-even once. It applies the same
// conventions as the unit: subnormal inputs read as zero, results below the
// normal range (after rounding) flushed to signed zero, overflow to infinity,
// canonical quiet NaN 0x7FC00000.
package fdp_ref_pkg;

  localparam int BIGW = 640;

  function automatic logic [31:0] ref_fdp(input logic [31:0] a, b, c, d,
                                          input logic op_sub, input logic [1:0] mode);
    logic        sa, sb, sc, sd, s_ab, s_cd;
    int          ea, eb, ec, ed, pe_ab, pe_cd, emin, q, rexp;
    logic [23:0] ma, mb, mc, md;
    logic        za, zb, zc, zd, ia, ib, ic, id, na, nb, nc, nd;
    logic        z_ab, z_cd, i_ab, i_cd, n_ab, n_cd;
    logic [47:0] p_ab, p_cd;
    logic signed [BIGW-1:0] x_ab, x_cd, sum;
    logic [BIGW-1:0] mag;
    logic        rsign, guard, sticky, up;
    logic [24:0] sig;

    {sa, ea, ma} = {a[31], int'(a[30:23]), (a[30:23] == 0) ? 24'd0 : {1'b1, a[22:0]}};
    {sb, eb, mb} = {b[31], int'(b[30:23]), (b[30:23] == 0) ? 24'd0 : {1'b1, b[22:0]}};
    {sc, ec, mc} = {c[31], int'(c[30:23]), (c[30:23] == 0) ? 24'd0 : {1'b1, c[22:0]}};
    {sd, ed, md} = {d[31], int'(d[30:23]), (d[30:23] == 0) ? 24'd0 : {1'b1, d[22:0]}};
    za = (ea == 0); zb = (eb == 0); zc = (ec == 0); zd = (ed == 0);
    ia = (ea == 255) && (a[22:0] == 0); na = (ea == 255) && (a[22:0] != 0);
    ib = (eb == 255) && (b[22:0] == 0); nb = (eb == 255) && (b[22:0] != 0);
    ic = (ec == 255) && (c[22:0] == 0); nc = (ec == 255) && (c[22:0] != 0);
    id = (ed == 255) && (d[22:0] == 0); nd = (ed == 255) && (d[22:0] != 0);

    if (mode == 2'd1) begin            // A +/- C: B and D read as 1.0
      sb = 0; eb = 127; mb = 24'h800000; zb = 0; ib = 0; nb = 0;
      sd = 0; ed = 127; md = 24'h800000; zd = 0; id = 0; nd = 0;
    end
    s_ab = sa ^ sb;
    s_cd = sc ^ sd ^ op_sub;
    z_ab = za | zb; z_cd = zc | zd;
    i_ab = ia | ib; i_cd = ic | id;
    n_ab = na | nb | (i_ab & z_ab);
    n_cd = nc | nd | (i_cd & z_cd);
    if (mode == 2'd2) begin            // C*D only
      s_ab = s_cd; z_ab = 1; i_ab = 0; n_ab = 0;
    end

    if (n_ab || n_cd || (i_ab && i_cd && s_ab != s_cd)) return 32'h7FC0_0000;
    if (i_ab) return {s_ab, 8'hFF, 23'd0};
    if (i_cd) return {s_cd, 8'hFF, 23'd0};
    if (z_ab && z_cd) return {s_ab & s_cd, 31'd0};

    p_ab  = z_ab ? 48'd0 : 48'(ma) * 48'(mb);
    p_cd  = z_cd ? 48'd0 : 48'(mc) * 48'(md);
    pe_ab = ea + eb;               // value = p * 2^(pe - 254 - 46)
    pe_cd = ec + ed;
    if (z_ab) emin = pe_cd;
    else if (z_cd) emin = pe_ab;
    else emin = (pe_ab < pe_cd) ? pe_ab : pe_cd;
    x_ab = z_ab ? '0 : (BIGW'(p_ab) << (pe_ab - emin));
    x_cd = z_cd ? '0 : (BIGW'(p_cd) << (pe_cd - emin));
    if (s_ab) x_ab = -x_ab;
    if (s_cd) x_cd = -x_cd;
    sum = x_ab + x_cd;
    if (sum == 0) return 32'h0000_0000;
    rsign = sum[BIGW-1];
    mag   = rsign ? -sum : sum;
    q = 0;
    for (int i = 0; i < BIGW; i++) if (mag[i]) q = i;
    // value = 1.x * 2^(q + emin - 300); biased exponent = q + emin - 173
    rexp = q + emin - 173;
    if (q <= 23) begin
      sig = 25'(mag << (23 - q));
      up = 0;
    end else begin
      sig    = 25'(mag >> (q - 23));
      guard  = mag[q-24];
      sticky = 0;
      for (int i = 0; i < q - 24; i++) sticky |= mag[i];
      up  = guard & (sticky | sig[0]);
      sig = sig + 25'(up);
      if (sig[24]) begin
        sig  = sig >> 1;
        rexp = rexp + 1;
      end
    end
    if (rexp >= 255) return {rsign, 8'hFF, 23'd0};
    if (rexp <= 0) return {rsign, 31'd0};
    return {rsign, 8'(rexp), sig[22:0]};
  endfunction

  // Random single-precision operand with the exponent in [lo, hi].
  function automatic logic [31:0] rand_fp(input int lo, input int hi);
    int e;
    e = lo + int'($urandom % 32'(hi - lo + 1));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
