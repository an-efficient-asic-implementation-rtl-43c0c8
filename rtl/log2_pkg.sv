// log2_pkg: constants and constant functions shared by the logarithm generator.
//
// The generator computes log2(N) = n + log2(1+x) for an unsigned W-bit N, where n is
// the position of the leading one and x the fraction below it. The fraction function
// log2(1+x) = x + E_L(x) is approximated as x + D(x) + C(x):
//   * D(x) is a quasi-symmetrical piecewise-linear fit of the Mitchell error E_L(x).
//     On [0,0.5) it is slope1*x+offset1 below 0.25 and slope2*x+offset2 above; on
//     [0.5,1) the same two segments are reused on the one's complement of x.
//     Slopes 1/4 and 1/16 and offsets 0.004 and 0.0518 are the published values; the
//     offsets are rounded here to L-bit fixed point (33 and 424 for L = 13).
//   * C(x) is a small signed table, indexed by the top LUT_AW bits of x, holding the
//     remaining error E_L - D in units of 2^-(L-LUT_SH).
// The table is not stored as data: lut_entry() computes each entry at elaboration
// time, with integer arithmetic only, as
//     C[j] = round( (max_g + min_g) / 2 )   with  g(x) = log2(1+x) - x - D(x)
// taken over the first, middle and last code of csize j (g is concave inside a csize,
// so these bound it), expressed in LUT units. log2 is evaluated by repeated squaring
// to LOG_FB fraction bits. The choice of csize statistic and rounding is this design's own.
package log2_pkg;

  // Published configuration: 16-bit input, 13-bit output fraction.
  localparam int unsigned W_DEF      = 16;
  localparam int unsigned L_DEF      = 13;
  // Correction table: 7 address bits, 5-bit signed entries (128 x 5 = 640 bits).
  localparam int unsigned LUT_AW_DEF = 7;
  localparam int unsigned LUT_DW_DEF = 5;
  // Table LSB is 2^LUT_SH output LSBs (2^-10 for L = 13); this design's choice.
  localparam int unsigned LUT_SH_DEF = 3;
  // Segment slopes as right shifts: slope1 = 1/4, slope2 = 1/16.
  localparam int unsigned S1_SH      = 2;
  localparam int unsigned S2_SH      = 4;
  // Segment offsets as reals (published), rounded to L fraction bits by seg_offset().
  localparam real         OFFSET1    = 0.004;
  localparam real         OFFSET2    = 0.0518;

  // Fraction bits used when evaluating log2 for the table.
  localparam int unsigned LOG_FB     = 24;

  // Offset rounded to l fraction bits.
  function automatic int unsigned seg_offset(input real off, input int unsigned l);
    return int'($rtoi(off * (2.0 ** l) + 0.5));
  endfunction

  // D(x) of the hardware, in output LSBs (x is an l-bit fraction code).
  function automatic int unsigned seg_d(input int unsigned x, input int unsigned l);
    int unsigned mask, xc;
    bit          sel;
    mask = (1 << l) - 1;
    xc   = x[l-1] ? (~x & mask) : x;
    sel  = xc[l-2];
    return sel ? ((xc >> S2_SH) + seg_offset(OFFSET2, l))
               : ((xc >> S1_SH) + seg_offset(OFFSET1, l));
  endfunction

  // floor(log2(1 + x / 2^l) * 2^LOG_FB), by repeated squaring of the mantissa.
  function automatic longint log2_1px(input int unsigned x, input int unsigned l);
    longint unsigned m;
    longint          r;
    m = (64'd1 << 30) + (longint'(x) << (30 - l));   // 1+x with 30 fraction bits
    r = 0;
    for (int i = 0; i < LOG_FB; i++) begin
      m = (m * m) >> 30;
      r = r << 1;
      if (m >= (64'd2 << 30)) begin
        m = m >> 1;
        r = r | 1;
      end
    end
    return r;
  endfunction

  // Residual g(x) = log2(1+x) - x - D(x), in units of 2^-LOG_FB.
  function automatic longint resid(input int unsigned x, input int unsigned l);
    return log2_1px(x, l) - ((longint'(x) + longint'(seg_d(x, l))) << (LOG_FB - l));
  endfunction

  // Correction table entry j, in units of 2^-(l - lut_sh), as a signed integer.
  function automatic int lut_entry(input int unsigned j, input int unsigned l,
                                   input int unsigned aw, input int unsigned lut_sh);
    int unsigned csize, lo, mid, hi;
    longint      g0, g1, g2, gmax, gmin, s;
    int unsigned sh;
    csize = 1 << (l - aw);
    lo   = j * csize;
    mid  = lo + csize / 2;
    hi   = lo + csize - 1;
    g0 = resid(lo, l);
    g1 = resid(mid, l);
    g2 = resid(hi, l);
    gmax = (g0 > g1) ? g0 : g1;  gmax = (gmax > g2) ? gmax : g2;
    gmin = (g0 < g1) ? g0 : g1;  gmin = (gmin < g2) ? gmin : g2;
    s    = gmax + gmin;                       // twice the csize centre
    sh   = LOG_FB - l + lut_sh + 1;           // divide by 2 and by the LUT unit
    return int'((s + (64'sd1 <<< (sh - 1))) >>> sh);
  endfunction

endpackage
