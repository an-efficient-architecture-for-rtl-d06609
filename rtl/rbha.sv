// rbha: redundant-binary half adder cell, the rbfa with the second digit
// known to be zero (bp = 0, bn = 0). Used in the columns of an RB adder
// that lie below the second operand's lowest possible nonzero column.
//   h_out = ap & ~an;  zp = ~(ap ^ ~an) ^ h_in;  c_out = (ap ^ ~an) | h_in;
//   zn = ~c_in.
// Same interface and timing as rbfa minus the b inputs. Combinational.
module rbha (
  input  logic ap, an,
  input  logic h_in,
  input  logic c_in,
  output logic zp, zn,
  output logic h_out,
  output logic c_out
);
  logic t;
  always_comb begin
    t     = ap ^ ~an;
    h_out = ap & ~an;
    zp    = ~t ^ h_in;
    c_out = t | h_in;
    zn    = ~c_in;
  end
endmodule
