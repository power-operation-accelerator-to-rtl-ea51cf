// fp_ref_pkg: reference models used by the testbenches.
//
// fp_to_real / real_to_fp convert between single-precision words and the
// simulator's double-precision reals (real_to_fp rounds to nearest-even and
// flushes results below the normal range to zero, like the multiplier).
// fmul_ref multiplies two words through exact double arithmetic.
// log_mag_ref and pow_model compute the power approximation straight from
// its equations with ordinary integer arithmetic (no carry-save tricks), so
// they are independent of the RTL structure.
package fp_ref_pkg;

  function automatic real fp_to_real(logic [31:0] w);
    real v;
    if (w[30:23] == 8'd0) return 0.0;                 // subnormals read as 0
    v = (1.0 + real'(w[22:0]) / 8388608.0) * $pow(2.0, real'(int'(w[30:23]) - 127));
    return w[31] ? -v : v;
  endfunction

  // Round a real (assumed exactly representable in double) to single.
  function automatic logic [31:0] real_to_fp(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [51:0] m;
    logic [23:0] f;
    logic        g, st;
    d = $realtobits(r);
    s = d[63];
    if (d[62:0] == 63'd0) return {s, 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = d[51:0];
    f  = {1'b0, m[51:29]};
    g  = m[28];
    st = |m[27:0];
    if (g && (st || f[0])) f = f + 24'd1;
    if (f[23]) begin
      e = e + 1;
      f = 24'd0;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, 8'(e), f[22:0]};
  endfunction

  function automatic logic is_nan(logic [31:0] w);
    return (w[30:23] == 8'hFF) && (w[22:0] != 0);
  endfunction

  function automatic logic is_inf(logic [31:0] w);
    return (w[30:23] == 8'hFF) && (w[22:0] == 0);
  endfunction

  function automatic logic [31:0] fmul_ref(logic [31:0] a, logic [31:0] b);
    logic s;
    logic az, bz;
    s  = a[31] ^ b[31];
    az = (a[30:23] == 0);
    bz = (b[30:23] == 0);
    if (is_nan(a) || is_nan(b) || (is_inf(a) && bz) || (is_inf(b) && az))
      return 32'h7FC0_0000;
    if (is_inf(a) || is_inf(b)) return {s, 8'hFF, 23'd0};
    if (az || bz) return {s, 31'd0};
    return real_to_fp(fp_to_real(a) * fp_to_real(b));
  endfunction

  // -log2(cos) magnitude in fixed point with 23 fraction bits, straight
  // from the three line segments of the approximation.
  function automatic longint log_mag_ref(logic [31:0] w);
    longint base, x;
    base = (longint'(127) - longint'(w[30:23])) * longint'(8388608);
    x    = longint'(w[22:0]);
    if (x < 64'd2097152)      return base - x - (x >> 2);           // x < 0.25
    else if (x < 64'd6291456) return base - x - 64'd524288;         // < 0.75
    else                      return base - x + (x >> 2) - 64'd2097152;
  endfunction

  // Bit-exact model of the power path: log, >>7, x Srm, >>9, saturate, exp.
  function automatic logic [31:0] pow_model(logic [31:0] a, logic [23:0] srm,
                                            output logic sat);
    logic [31:0]    w;
    longint         mag;
    logic [23:0]    l;
    logic [47:0]    p;
    longint         n;
    logic [22:0]    y;
    sat = 1'b0;
    if (a[31] || a[30:23] == 0) return 32'd0;
    w   = (a[30:23] >= 8'd127) ? 32'h3F80_0000 : a;
    mag = log_mag_ref(w);
    l   = 24'(mag >> 7);
    p   = 48'(l) * 48'(srm);
    n   = longint'(p[47:32]);
    y   = 23'(p >> 9);
    if (n > 255) begin
      sat = 1'b1;
      n   = 255;
      y   = '1;
    end
    if (n >= 126) return 32'd0;
    return {1'b0, 8'(126 - n), ~y};
  endfunction

  function automatic real log2r(real v);
    return $ln(v) / $ln(2.0);
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
