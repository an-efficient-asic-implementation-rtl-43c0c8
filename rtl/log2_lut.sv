// log2_lut: correction table of the log2(1+x) approximation.
//
// A read-only table of 2^AW signed entries of DW bits, addressed by the top AW bits
// of the fraction x. Entry j holds the error left after the piecewise-linear fit,
// log2(1+x) - x - D(x), at the centre of its range over cell j, in units of
// 2^-(L-LUT_SH); the formula is in log2_pkg::lut_entry and is evaluated at
// elaboration, so no data file is read. With the defaults (AW = 7, DW = 5) the
// table has the published size of 640 bits; its entries span -10..+10.
// Combinational read (a ROM).
module log2_lut
  import log2_pkg::*;
#(
  parameter int unsigned L      = L_DEF,
  parameter int unsigned AW     = LUT_AW_DEF,
  parameter int unsigned DW     = LUT_DW_DEF,
  parameter int unsigned LUT_SH = LUT_SH_DEF
) (
  input  logic [AW-1:0]        addr,   // top AW bits of x
  output logic signed [DW-1:0] data    // correction, units 2^-(L-LUT_SH)
);
  typedef logic signed [DW-1:0] entry_t;

  function automatic entry_t [2**AW-1:0] build_table();
    entry_t [2**AW-1:0] t;
    for (int unsigned j = 0; j < 2**AW; j++)
      t[j] = entry_t'(lut_entry(j, L, AW, LUT_SH));
    return t;
  endfunction

  localparam entry_t [2**AW-1:0] TABLE = build_table();

  assign data = TABLE[addr];

  // Every entry must fit DW signed bits; a wider residual needs a larger DW or LUT_SH.
  initial begin
    for (int unsigned j = 0; j < 2**AW; j++)
      assert (lut_entry(j, L, AW, LUT_SH) >= -(2**(DW-1)) &&
              lut_entry(j, L, AW, LUT_SH) <   2**(DW-1))
        else $error("log2_lut: entry %0d does not fit %0d bits", j, DW);
  end
endmodule
