// full_adder: one-bit full adder, the cell of the ripple-carry adder.
// s = a ^ b ^ cin, cout = majority(a, b, cin). Combinational.
module full_adder (
  input  logic a, b, cin,
  output logic s, cout
);
  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
