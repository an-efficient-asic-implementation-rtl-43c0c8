// lode_inv: the INV block between the LODE and the barrel shifter.
//
// The leading-one position n (0..W-1) is turned into the left shift W-1-n that
// brings the leading one of N to the top bit. Measured from 1 (m = n+1) this is
// W-m, the control value the modified barrel shifter uses; for a power-of-two W it
// is the bitwise complement of n, so the block is K inverters. Combinational.
module lode_inv #(
  parameter int unsigned W = 16,
  localparam int unsigned K = $clog2(W)
) (
  input  logic [K-1:0] n,      // leading-one position from the LODE
  output logic [K-1:0] shamt   // W-1-n
);
  assign shamt = ~n;
endmodule
