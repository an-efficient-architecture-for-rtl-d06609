// rca: W-bit ripple-carry adder (64 bits by default), the MAC's
// accumulation adder. A chain of full_adder cells: {cout, s} = a + b + cin.
// The carry ripples through all W cells, so the delay is W full-adder
// carry delays. Combinational.
module rca #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
