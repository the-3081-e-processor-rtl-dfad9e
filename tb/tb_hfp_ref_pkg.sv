// tb_hfp_ref_pkg: reference model of IBM System/370 hexadecimal floating
// point for the testbenches, written digit by digit from the architecture's
// rules (one guard digit for add/subtract, truncated results, true zero on
// underflow), independently of the RTL datapaths.
package tb_hfp_ref_pkg;

  typedef logic [127:0] big_t;

  function automatic big_t fracof(logic [63:0] x, bit dbl);
    return dbl ? big_t'(x[55:0]) : big_t'(x[55:32]);
  endfunction

  function automatic logic [63:0] mk(bit s, int e, big_t f, bit dbl, output bit ovf);
    ovf = 0;
    if (f == 0 || e < 0) return 64'h0;
    if (e > 127) ovf = 1;
    if (dbl) return {s, 7'(e), f[55:0]};
    return {s, 7'(e), f[23:0], 32'h0};
  endfunction

  function automatic big_t p16(int n);
    big_t r = 1;
    repeat (n) r = r * 16;
    return r;
  endfunction

  // add / subtract; sets cmp (-1, 0, 1 sign of the exact-guard difference)
  function automatic logic [63:0] add(logic [63:0] a, logic [63:0] b, bit dbl, bit sub,
                                      output bit ovf, output int sgn);
    int   F = dbl ? 14 : 6;
    int   ea = int'(a[62:56]), eb = int'(b[62:56]), e;
    bit   sa = a[63], sb = b[63] ^ sub, s;
    big_t fa = fracof(a, dbl) * 16, fb = fracof(b, dbl) * 16, m;
    if (ea < eb) begin
      for (int i = 0; i < eb - ea; i++) fa = fa / 16;
      e = eb;
    end else begin
      for (int i = 0; i < ea - eb; i++) fb = fb / 16;
      e = ea;
    end
    if (sa == sb) begin m = fa + fb; s = sa; end
    else if (fa >= fb) begin m = fa - fb; s = sa; end
    else begin m = fb - fa; s = sb; end
    sgn = (m == 0) ? 0 : (s ? -1 : 1);
    ovf = 0;
    if (m == 0) return 64'h0;
    if (m >= p16(F + 1)) begin m = m / 16; e++; end
    while (m < p16(F)) begin m = m * 16; e--; end
    return mk(s, e, m / 16, dbl, ovf);
  endfunction

  function automatic logic [63:0] mul(logic [63:0] a, logic [63:0] b, bit dbl, output bit ovf);
    int   F = dbl ? 14 : 6;
    int   e = int'(a[62:56]) + int'(b[62:56]) - 64;
    big_t p = fracof(a, dbl) * fracof(b, dbl);
    ovf = 0;
    if (p == 0) return 64'h0;
    while (p < p16(2 * F - 1)) begin p = p * 16; e--; end
    if (2 * F >= 14) p = p / p16(2 * F - 14);
    else             p = p * p16(14 - 2 * F);
    return mk(a[63] ^ b[63], e, p, 1, ovf);
  endfunction

  function automatic logic [63:0] div(logic [63:0] a, logic [63:0] b, bit dbl, output bit ovf);
    int   F = dbl ? 14 : 6;
    int   ea = int'(a[62:56]), eb = int'(b[62:56]), e;
    big_t fa = fracof(a, dbl), fb = fracof(b, dbl), q;
    ovf = 0;
    if (fb == 0) begin ovf = 1; return a; end
    if (fa == 0) return 64'h0;
    while (fa < p16(F - 1)) begin fa = fa * 16; ea--; end
    while (fb < p16(F - 1)) begin fb = fb * 16; eb--; end
    e = ea - eb + 64;
    if (fa >= fb) begin fb = fb * 16; e++; end
    q = (fa * p16(F)) / fb;
    return mk(a[63] ^ b[63], e, dbl ? q : q, dbl, ovf);
  endfunction

  // random normalized operand with characteristic in [lo, hi]
  function automatic logic [63:0] rnd(bit dbl, int lo, int hi);
    logic [63:0] x;
    x = {$urandom, $urandom};
    x[62:56] = 7'(lo + int'($urandom_range(0, hi - lo)));
    if (x[55:52] == 0) x[55:52] = 4'(1 + $urandom_range(0, 14));
    if (!dbl) x[31:0] = '0;
    if ($urandom_range(0, 19) == 0) x = 64'h0;
    return x;
  endfunction

endpackage
