// lode4: 4-bit merged leading-one detector and encoder (LODE4).
//
// Detects the most significant '1' of d and gives its position directly in binary
// (a = 3 for d[3], 2 for d[2], ...), without an intermediate one-hot code. The flag z
// is 1 when d holds at least one '1' and 0 when d is all zeros; a is 0 in that case.
// This is the published truth table of the 4-bit merged LODE. Purely combinational.
module lode4 (
  input  logic [3:0] d,   // input word
  output logic [1:0] a,   // position of the leading one
  output logic       z    // 1: d is nonzero
);
  always_comb begin
    a[1] = d[3] | d[2];
    a[0] = d[3] | (~d[2] & d[1]);
    z    = |d;
  end
endmodule
