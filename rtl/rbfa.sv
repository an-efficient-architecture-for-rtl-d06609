// rbfa: redundant-binary full adder cell (one column of an RB adder).
//
// Adds digit a = ap - an and digit b = bp - bn without carry propagation.
// Internally the four bits (ap, ~an, bp, ~bn) feed a 4:2 compressor: the
// transfer h_out = maj(ap, ~an, bp) goes to the next column's h_in, and a
// full adder sums (ap ^ ~an ^ bp, ~bn, h_in) into s and carry c_out. The
// sum digit of this column is (zp, zn) = (s, ~c_in), where c_in is c_out of
// the column below. With the lowest column fed h_in = 0 and c_in = 1 the
// chain computes a + b exactly, modulo 2^width (see rb_adder). h_out never
// depends on h_in, so the delay does not grow with the width.
// Cell-level structure is this design's choice; the document names the cell.
module rbfa (
  input  logic ap, an, bp, bn,
  input  logic h_in,
  input  logic c_in,
  output logic zp, zn,
  output logic h_out,
  output logic c_out
);
  logic t;
  always_comb begin
    h_out = (ap & ~an) | (ap & bp) | (~an & bp);
    t     = ap ^ ~an ^ bp;
    zp    = t ^ ~bn ^ h_in;
    c_out = (t & ~bn) | (t & h_in) | (~bn & h_in);
    zn    = ~c_in;
  end
endmodule
