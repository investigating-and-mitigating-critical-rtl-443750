// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: IEEE-754 single values are handled through
// double-precision reals and their bit patterns, posits through a bit-serial
// decoder to real and a binary search over the ordered posit codes.
package tb_ref_pkg;

  function automatic real pow2(input int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  // ---- IEEE-754 single --------------------------------------------------------
  function automatic real fp_to_real(input logic [31:0] x);
    logic [63:0] d;
    int e;
    e = int'(x[30:23]) - 127 + 1023;
    d = {x[31], 11'(e), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // product with flush-to-zero of subnormal inputs and of results below the
  // smallest normal (decided after rounding), NaN = 0x7FC00000
  function automatic logic [31:0] fp_mul_ref(input logic [31:0] a, input logic [31:0] b);
    logic sa, sb, s;
    logic a_nan, b_nan, a_inf, b_inf, a_z, b_z;
    real  p;
    logic [63:0] d;
    int   e;
    logic [22:0] keep;
    logic [28:0] rem;
    logic [24:0] m;
    sa = a[31]; sb = b[31]; s = sa ^ sb;
    a_nan = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    b_nan = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    a_inf = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    b_inf = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    a_z   = (a[30:23] == 0);
    b_z   = (b[30:23] == 0);
    if (a_nan || b_nan || (a_inf && b_z) || (b_inf && a_z)) return 32'h7FC0_0000;
    if (a_inf || b_inf) return {s, 8'hFF, 23'd0};
    if (a_z || b_z) return {s, 31'd0};
    p = fp_to_real({1'b0, a[30:0]}) * fp_to_real({1'b0, b[30:0]});
    d = $realtobits(p);
    e = int'(d[62:52]) - 1023;
    keep = d[51:29];
    rem  = d[28:0];
    m = {2'b01, keep};
    if (rem > 29'h1000_0000 || (rem == 29'h1000_0000 && keep[0])) m = m + 1;
    if (m[24]) begin e = e + 1; m = m >> 1; end
    e = e + 127;
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0) return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  // ---- Posit(32,2) ----------------------------------------------------------
  function automatic real posit_to_real(input logic [31:0] p);
    logic [31:0] v;
    int i, run, k, e, nf;
    real f, r;
    logic first;
    if (p == 0) return 0.0;
    v = p[31] ? -p : p;
    i = 30;
    first = v[30];
    run = 0;
    while (i >= 0 && v[i] == first) begin run++; i--; end
    i--;  // terminating bit
    k = first ? run - 1 : -run;
    e = 0;
    for (int j = 0; j < 2; j++) begin
      e = e * 2;
      if (i >= 0) begin e = e + int'(v[i]); i--; end
    end
    f = 1.0; r = 0.5;
    while (i >= 0) begin
      if (v[i]) f = f + r;
      r = r / 2.0; i--;
    end
    r = f * pow2(4 * k + e);
    return p[31] ? -r : r;
  endfunction

  // nearest posit, ties to the even code; never rounds to zero or NaR
  function automatic logic [31:0] real_to_posit(input real x);
    real ax, lo_v, hi_v, mid;
    logic [31:0] lo, hi, md, r;
    if (x == 0.0) return 32'd0;
    ax = (x < 0.0) ? -x : x;
    if (ax <= posit_to_real(32'd1)) r = 32'd1;
    else if (ax >= posit_to_real(32'h7FFF_FFFF)) r = 32'h7FFF_FFFF;
    else begin
      lo = 32'd1; hi = 32'h7FFF_FFFF;   // val(lo) <= ax < val(hi)
      while (hi - lo > 1) begin
        md = lo + (hi - lo) / 2;
        if (posit_to_real(md) <= ax) lo = md; else hi = md;
      end
      lo_v = posit_to_real(lo);
      hi_v = posit_to_real(hi);
      mid  = (lo_v + hi_v) / 2.0;
      if (ax < mid) r = lo;
      else if (ax > mid) r = hi;
      else r = lo[0] ? hi : lo;
    end
    return (x < 0.0) ? -r : r;
  endfunction

  // random real in (-range, range), magnitude at least range * 2^-20
  function automatic real rand_in_range(input real range);
    real r;
    do begin
      r = (real'($urandom) / 4294967296.0 * 2.0 - 1.0) * range;
    end while ((r < 0.0 ? -r : r) < range / 1048576.0);
    return r;
  endfunction

  // sum in double precision (exact for two singles whose exponents differ by
  // less than 29, and far from a rounding tie otherwise), rounded to single,
  // nearest, ties to even; flush-to-zero of subnormal inputs and of results
  // below the smallest normal; NaN = 0x7FC00000; an exact zero sum is +0
  // unless both operands are -0
  function automatic logic [31:0] fp_add_ref(input logic [31:0] x, input logic [31:0] z);
    logic xn, zn, xi, zi, xz, zz;
    real  s;
    logic [63:0] d;
    int   e;
    logic [22:0] keep;
    logic [28:0] rem;
    logic [24:0] m;
    logic sg;
    xn = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    zn = (z[30:23] == 8'hFF) && (z[22:0] != 0);
    xi = (x[30:23] == 8'hFF) && (x[22:0] == 0);
    zi = (z[30:23] == 8'hFF) && (z[22:0] == 0);
    xz = (x[30:23] == 0);
    zz = (z[30:23] == 0);
    if (xn || zn || (xi && zi && x[31] != z[31])) return 32'h7FC0_0000;
    if (xi) return {x[31], 8'hFF, 23'd0};
    if (zi) return {z[31], 8'hFF, 23'd0};
    s = (xz ? 0.0 : fp_to_real(x)) + (zz ? 0.0 : fp_to_real(z));
    if (s == 0.0) return {x[31] & z[31], 31'd0};
    d = $realtobits(s);
    sg = d[63];
    e = int'(d[62:52]) - 1023;
    keep = d[51:29];
    rem  = d[28:0];
    m = {2'b01, keep};
    if (rem > 29'h1000_0000 || (rem == 29'h1000_0000 && keep[0])) m = m + 1;
    if (m[24]) begin e = e + 1; m = m >> 1; end
    e = e + 127;
    if (e >= 255) return {sg, 8'hFF, 23'd0};
    if (e <= 0) return {sg, 31'd0};
    return {sg, 8'(e), m[22:0]};
  endfunction

  // random finite normal single in roughly (-range, range)
  function automatic logic [31:0] fp_from_real(input real x);
    logic [63:0] d;
    int e;
    d = $realtobits(x);
    e = int'(d[62:52]) - 1023 + 127;
    // truncate to single precision (operands only need to be some single)
    return {d[63], 8'(e), d[51:29]};
  endfunction

endpackage
