// log2_gen: binary logarithm generator, log2(N) for an unsigned W-bit N.
//
// N = 2^n (1+x), so log2(N) = n + log2(1+x). The split LODE gives the integer part n
// (K bits) and the flag z (1 when N is nonzero). The INV block turns n into the shift
// W-1-n, the modified barrel shifter uses it to left-align the bits below the leading
// one as the L-bit fraction x, and log2_frac approximates F = log2(1+x). The result
// is the fixed-point number {n, F} with L fraction bits. For N = 0, z = 0, n = 0 and
// F is the approximation at x = 0. This is the published structure for W = 16 and
// L = 13; it is purely combinational, with no registers, as published.
module log2_gen
  import log2_pkg::*;
#(
  parameter int unsigned W = W_DEF,   // 16, 32 or 64
  parameter int unsigned L = L_DEF,
  localparam int unsigned K = $clog2(W)
) (
  input  logic [W-1:0] n_in,   // N
  output logic [K-1:0] n,      // characteristic (integer part)
  output logic [L-1:0] f,      // fraction part F ~ log2(1+x)
  output logic         z       // 1: N is nonzero
);
  logic [K-1:0] shamt;
  logic [L-1:0] x;

  lode_split #(.W(W)) u_lode (.d(n_in), .a(n), .z(z));
  lode_inv   #(.W(W)) u_inv  (.n(n), .shamt(shamt));
  mod_barrel_shifter #(.W(W), .L(L)) u_bs (.n_in(n_in), .shamt(shamt), .x(x));
  log2_frac  #(.L(L)) u_frac (.x(x), .y(f));
endmodule
