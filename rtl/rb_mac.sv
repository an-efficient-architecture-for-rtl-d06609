// rb_mac: 32-bit multiply-accumulate unit built on a redundant-binary (RB)
// multiplier.
//
// Datapath (one operation per clock):
//   product = a * b              rb_multiplier, combinational, 2N bits
//   {carry, sum} = acc[2N-1:0] + product      rca, 2N-bit ripple-carry adder
//   acc <= {carry, sum}          pipo_reg, 2N+1 bits
// The low 2N bits of the accumulator are fed back to the adder; bit 2N holds
// the carry-out of the most recent addition (it is not fed back). With a
// and b signed, acc[2N-1:0] is the running signed sum of products modulo
// 2^(2N).
// Control: en accumulates the current a*b at the next rising edge; clr
// clears the accumulator at the next edge (priority over en); rst_n resets
// it asynchronously. These controls, the signedness and the register
// keeping the carry bit are this design's choices; the multiplier, adder and
// PIPO accumulator structure follow the document. Latency: the product of
// operands presented in cycle t is in acc after the edge ending cycle t.
module rb_mac
  import rb_mac_pkg::*;
#(
  parameter int unsigned N = MAC_N
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           en,
  input  logic [N-1:0]   a,        // signed multiplicand
  input  logic [N-1:0]   b,        // signed multiplier
  output logic [2*N-1:0] product,  // a * b, combinational
  output logic [2*N:0]   acc       // {carry, running sum}
);
  logic [2*N-1:0] sum;
  logic           carry;

  rb_multiplier #(.N(N)) u_mul (.x(a), .y(b), .p(product));

  rca #(.W(2 * N)) u_add (
    .a(acc[2*N-1:0]), .b(product), .cin(1'b0), .s(sum), .cout(carry)
  );

  pipo_reg #(.W(2 * N + 1)) u_acc (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d({carry, sum}), .q(acc)
  );
endmodule
