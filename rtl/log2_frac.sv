// log2_frac: quasi-symmetrical approximation of the fundamental function log2(1+x).
//
// Input x is an L-bit fraction (0 <= x < 1); output y ~ log2(1+x), also L bits.
// y = x + D(x) + C(x), one three-input addition:
//   * Complement: when the MSB of x is 1 the x bits are inverted (xc ~ 1-x), so the
//     mirrored half [0.5,1) reuses the two segments of [0,0.5).
//   * MUX: the bit of weight 1/4 of xc picks segment 2 (xc >> 4, plus offset2) or
//     segment 1 (xc >> 2, plus offset1): slopes 1/4 and 1/16 need no multiplier.
//   * LUT: 7 MSBs of x address a 5-bit signed correction, sign extended and scaled to
//     L bits.
// Slopes, offsets, segment boundaries (0.25, 0.5, 0.75), the complement driven by the
// MSB, the 7-bit LUT address and the 5-bit entry are the published design. Folding
// the offsets into the MUX inputs, the LUT scale of 2^-10 and clamping the sum to
// [0, 1-2^-L] are this design's choices. Combinational.
module log2_frac
  import log2_pkg::*;
#(
  parameter int unsigned L      = L_DEF,
  parameter int unsigned AW     = LUT_AW_DEF,
  parameter int unsigned DW     = LUT_DW_DEF,
  parameter int unsigned LUT_SH = LUT_SH_DEF
) (
  input  logic [L-1:0] x,   // fraction of N
  output logic [L-1:0] y    // ~log2(1+x)
);
  localparam logic [L-1:0] OFF1 = L'(seg_offset(OFFSET1, L));
  localparam logic [L-1:0] OFF2 = L'(seg_offset(OFFSET2, L));

  logic [L-1:0]        xc;       // complemented fraction
  logic                sel;      // segment select
  logic [L-1:0]        seg;      // MUX output: slope*xc + offset
  logic signed [DW-1:0] corr;    // LUT output
  logic signed [L+2:0] corr_ext; // sign-extended, scaled correction
  logic signed [L+2:0] sum;

  log2_lut #(.L(L), .AW(AW), .DW(DW), .LUT_SH(LUT_SH)) u_lut (
    .addr(x[L-1 -: AW]),
    .data(corr)
  );

  always_comb begin
    xc       = x[L-1] ? ~x : x;
    sel      = xc[L-2];
    seg      = sel ? ((xc >> S2_SH) + OFF2) : ((xc >> S1_SH) + OFF1);
    corr_ext = (L+3)'(corr) <<< LUT_SH;
    sum      = signed'({3'b000, x}) + signed'({3'b000, seg}) + corr_ext;
    if (sum < 0)                      y = '0;
    else if (sum > (2**L - 1))        y = '1;
    else                              y = sum[L-1:0];
  end
endmodule
