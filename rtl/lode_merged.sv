// lode_merged: direct merged leading-one detector and encoder of any width.
//
// The generalisation of the 4-bit merged LODE to W bits: one priority encoder that
// gives the binary position of the most significant '1' of d directly. z is 1 when
// d is nonzero; a is 0 when d is zero. It is the 8-bit building block of the 32-bit
// split LODE. The document gives its function, not its gates: the priority scan
// below is this design's own description of it. Purely combinational.
module lode_merged #(
  parameter int unsigned W = 8,
  localparam int unsigned K = $clog2(W)
) (
  input  logic [W-1:0] d,
  output logic [K-1:0] a,
  output logic         z
);
  always_comb begin
    a = '0;
    for (int i = 0; i < W; i++)
      if (d[i]) a = K'(i);
    z = |d;
  end
endmodule
