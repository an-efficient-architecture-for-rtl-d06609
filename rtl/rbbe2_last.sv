// rbbe2_last: the last RB partial product row, formed without any
// error-correcting word and without negating the multiplicand.
//
// The last row sits at column N-4 and only its low N+4 columns matter for a
// 2N-bit product, so it is computed modulo 2^(N+4). Its two Booth digits
// d_e = d(N/2-2) and d_o = d(N/2-1) are taken together as one digit
// e = d_e + 4*d_o = -8*y[N-1] + 4*y[N-2] + 2*y[N-3] + y[N-4] + y[N-5],
// which lies in -8..8. For |e| the row is a difference of two multiples
// that need no adder (x, 2x, 4x, 8x are shifts of the sign-extended x):
//     |e|  0  1   2   3   4   5      6   7   8
//     pos  0  x   2x  4x  4x  (5x)   8x  8x  8x
//     neg  0  0   0   x   0   (5x)   2x  x   0
// and for e < 0 the two sides are swapped. Because the negative side holds
// a magnitude rather than an inverted word, no +1 correction bit is left.
// 5x is the one multiple that is not a difference of two such shifts; it is
// written in RB form directly from the bits of a = x and b = 4x:
//     pos[k] = a[k-1] | b[k-1],   neg[k] = a[k] ^ b[k]
// (a[k] + b[k] = 2*(a[k] | b[k]) - (a[k] ^ b[k]) column by column, no carry).
// The document says the last row's correction word is merged into the row
// by logic simplification but gives no equations; this radix-16 style
// recoding of the last row is this design's own way of achieving it.
// Combinational.
module rbbe2_last
  import rb_mac_pkg::*;
#(
  parameter int unsigned N = MAC_N
) (
  input  logic [N-1:0] x,      // signed multiplicand
  input  logic [4:0]   y5,     // y[N-1:N-5]
  output logic [N+3:0] row_p,  // positive bits, weight 2^(N-4+k)
  output logic [N+3:0] row_n   // negative bits, weight 2^(N-4+k)
);
  localparam int unsigned W = N + 4;

  logic signed [4:0] e;
  logic        [3:0] mag;
  logic              neg;
  logic [W-1:0]      x1, x2, x4, x8, p5, n5, pm, nm;

  always_comb begin
    e   = $signed({y5[4], y5[4], y5[3], y5[2], 1'b0}) + $signed({4'b0, y5[1]})
        + $signed({4'b0, y5[0]});
    neg = e[4];
    mag = neg ? 4'(-e) : 4'(e);

    x1 = W'($signed(x));
    x2 = x1 << 1;
    x4 = x1 << 2;
    x8 = x1 << 3;
    p5 = {x1[W-2:0] | x4[W-2:0], 1'b0};
    n5 = x1 ^ x4;

    case (mag)
      4'd1:    begin pm = x1; nm = '0; end
      4'd2:    begin pm = x2; nm = '0; end
      4'd3:    begin pm = x4; nm = x1; end
      4'd4:    begin pm = x4; nm = '0; end
      4'd5:    begin pm = p5; nm = n5; end
      4'd6:    begin pm = x8; nm = x2; end
      4'd7:    begin pm = x8; nm = x1; end
      4'd8:    begin pm = x8; nm = '0; end
      default: begin pm = '0; nm = '0; end
    endcase

    row_p = neg ? nm : pm;
    row_n = neg ? pm : nm;
  end
endmodule
