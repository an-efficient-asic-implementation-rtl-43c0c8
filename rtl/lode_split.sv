// lode_split: leading-one detector and encoder with input decomposition (split LODE).
//
// The W-bit word is cut into four quarters of W/4 bits, each handled by its own small
// LODE in parallel. The quarter flags z3..z0 feed an OR4 (the overall nonzero flag z)
// and a 2-bit priority encoder that picks the highest nonzero quarter q. One MUX4
// selects that quarter's local position A_q, a second MUX4 selects the constant
// q*W/4 (0000, 0100, 1000, 1100 for W = 16), and an adder forms a = q*W/4 + A_q.
// Primitive per width, as published: 4-bit merged LODE for W = 16, 8-bit direct
// merged LODE for W = 32 and a 16-bit LODE for W = 64 (here the split 16-bit one,
// this design's choice). Purely combinational; a = 0 when d = 0.
module lode_split #(
  parameter int unsigned W = 16,            // 16, 32 or 64
  localparam int unsigned K  = $clog2(W),
  localparam int unsigned Q  = W / 4,        // quarter width
  localparam int unsigned KQ = $clog2(Q)
) (
  input  logic [W-1:0] d,
  output logic [K-1:0] a,     // position of the leading one
  output logic         z      // 1: d is nonzero
);
  logic [3:0]         zq;             // per-quarter nonzero flags
  logic [KQ-1:0]      aq [4];         // per-quarter local positions
  logic [1:0]         q;              // selected quarter (2-bit encoder)
  logic [KQ-1:0]      a_sel;          // MUX4 on the local positions
  logic [K-1:0]       c_sel;          // MUX4 on the constants q*Q

  for (genvar g = 0; g < 4; g++) begin : g_quarter
    if (Q == 4) begin : g_l4
      lode4 u_lode (.d(d[g*Q +: Q]), .a(aq[g]), .z(zq[g]));
    end else if (Q == 8) begin : g_l8
      lode_merged #(.W(Q)) u_lode (.d(d[g*Q +: Q]), .a(aq[g]), .z(zq[g]));
    end else begin : g_lsplit
      lode_split #(.W(Q)) u_lode (.d(d[g*Q +: Q]), .a(aq[g]), .z(zq[g]));
    end
  end

  always_comb begin
    // OR4
    z = |zq;
    // 2-bit encoder: highest quarter with a '1'
    if      (zq[3]) q = 2'd3;
    else if (zq[2]) q = 2'd2;
    else if (zq[1]) q = 2'd1;
    else            q = 2'd0;
    // MUX4 on the quarter results and MUX4 on the constants
    a_sel = aq[q];
    case (q)
      2'd0:    c_sel = K'(0 * Q);
      2'd1:    c_sel = K'(1 * Q);
      2'd2:    c_sel = K'(2 * Q);
      default: c_sel = K'(3 * Q);
    endcase
    // K-bit adder
    a = c_sel + K'(a_sel);
  end

  initial begin
    assert (W == 16 || W == 32 || W == 64)
      else $error("lode_split: W must be 16, 32 or 64");
  end
endmodule
