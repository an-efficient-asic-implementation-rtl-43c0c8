// mod_barrel_shifter: modified barrel shifter that extracts the fraction x of N.
//
// With N = 2^n (1+x), x is the bits of N below its leading one, left aligned.
// A conventional shifter would need a shift of W-n (W+1-m, m = n+1), which takes
// K+1 control bits. Here the K-bit value W-1-n from the INV block drives a
// conventional K-stage logarithmic left shifter, which puts the leading one on the
// top bit, and one further fixed 1-bit shift (wiring only) drops it. The top L of
// the remaining W-1 bits are x; lower bits are truncated (W-1 > L), or zeros are
// appended (W-1 < L). The split into K stages and the truncation are this
// design's choices; the dropped low bits are why lint reports part of frac unused.
// Combinational.
module mod_barrel_shifter #(
  parameter int unsigned W = 16,
  parameter int unsigned L = 13,
  localparam int unsigned K = $clog2(W)
) (
  input  logic [W-1:0] n_in,    // input word N
  input  logic [K-1:0] shamt,   // W-1-n from the INV block
  output logic [L-1:0] x        // fraction bits of N, MSB = 2^-1
);
  logic [W-1:0] stage [K+1];
  logic [W-1:0] frac;           // after the extra 1-bit shift

  always_comb begin
    stage[0] = n_in;
    for (int s = 0; s < K; s++)
      stage[s+1] = shamt[s] ? (stage[s] << (1 << s)) : stage[s];
    frac = stage[K] << 1;       // additional fixed shift
  end

  if (W - 1 >= L) begin : g_trunc
    assign x = frac[W-1 -: L];
  end else begin : g_pad
    assign x = {frac[W-1 -: W-1], {(L-W+1){1'b0}}};
  end
endmodule
