// tb_log2_ref_pkg: floating-point reference model for the logarithm testbenches.
//
// Recomputes, with real arithmetic and without using the RTL package, what the
// hardware should produce: the leading-one position, the fraction x of N, the
// piecewise-linear term D(x) (slopes 1/4 and 1/16, offsets 0.004 and 0.0518 rounded
// to 13 bits, mirrored about x = 0.5 by one's complement), the correction table
// (centre of max and min of log2(1+x) - x - D(x) over the first, middle and last code
// of each 64-code cell, in units of 2^-10) and the resulting 13-bit fraction.
package tb_log2_ref_pkg;

  function automatic real rlog2(input real v);
    return $ln(v) / $ln(2.0);
  endfunction

  // Leading-one position by a plain scan; returns -1 for zero.
  function automatic int ref_lead(input longint unsigned v, input int w);
    int p;
    p = -1;
    for (int i = 0; i < w; i++)
      if (v[i]) p = i;
    return p;
  endfunction

  function automatic int ref_offset(input real off, input int l);
    return int'($floor(off * (2.0 ** l) + 0.5));
  endfunction

  function automatic int ref_d(input int x, input int l);
    int xc, full;
    full = (1 << l) - 1;
    xc = (x >= (1 << (l - 1))) ? (full - x) : x;
    if (xc >= (1 << (l - 2))) return (xc / 16) + ref_offset(0.0518, l);
    else                      return (xc / 4)  + ref_offset(0.004, l);
  endfunction

  // g(x) in output LSBs (real)
  function automatic real ref_g(input int x, input int l);
    return rlog2(1.0 + real'(x) / (2.0 ** l)) * (2.0 ** l) - real'(x) - real'(ref_d(x, l));
  endfunction

  function automatic int ref_lut(input int j, input int l, input int aw, input int sh);
    int  cs, lo;
    real g0, g1, g2, mx, mn;
    cs = 1 << (l - aw);
    lo = j * cs;
    g0 = ref_g(lo, l);  g1 = ref_g(lo + cs / 2, l);  g2 = ref_g(lo + cs - 1, l);
    mx = (g0 > g1) ? g0 : g1;  mx = (mx > g2) ? mx : g2;
    mn = (g0 < g1) ? g0 : g1;  mn = (mn < g2) ? mn : g2;
    return int'($floor((mx + mn) / 2.0 / (2.0 ** sh) + 0.5));
  endfunction

  // Expected 13-bit-style fraction output for fraction code x.
  function automatic int ref_frac(input int x, input int l, input int aw, input int sh);
    int s;
    s = x + ref_d(x, l) + ref_lut(x >> (l - aw), l, aw, sh) * (1 << sh);
    if (s < 0) s = 0;
    if (s > (1 << l) - 1) s = (1 << l) - 1;
    return s;
  endfunction

endpackage
