// mbe_encoder: radix-4 modified Booth encoder for one digit.
//
// The digit d = -2*y[2j+1] + y[2j] + y[2j-1] is in {-2..2}. The encoder
// turns the three multiplier bits into the select signals of one partial
// product row: one (|d| = 1), two (|d| = 2) and neg (d < 0). The all-ones
// triplet (d = 0) gives neg = 0, a choice of this design that keeps the
// correction bit of a zero row at zero. Purely combinational.
module mbe_encoder
  import rb_mac_pkg::*;
(
  input  logic [2:0]  y3,   // {y[2j+1], y[2j], y[2j-1]}
  output booth_sel_t  sel
);
  always_comb begin
    sel.one = y3[1] ^ y3[0];
    sel.two = (y3[2] & ~y3[1] & ~y3[0]) | (~y3[2] & y3[1] & y3[0]);
    sel.neg = y3[2] & ~(y3[1] & y3[0]);
  end
endmodule
