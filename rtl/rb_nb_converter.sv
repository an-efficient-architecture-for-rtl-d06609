// rb_nb_converter: redundant-binary to two's-complement converter.
//
// Computes s = rp - rn = rp + ~rn + 1 (mod 2^(2N)) with a hybrid
// parallel-prefix / carry-select adder: the 2N columns are cut into BLK-bit
// blocks; each block forms its sum twice by rippling (block carry-in 0 and
// 1) together with its group generate/propagate; a Kogge-Stone prefix network
// over the block signals gives every block's carry-in, which selects one of
// the two sums. The document asks for a hybrid parallel-prefix/carry-select
// adder; the Kogge-Stone block network and BLK = 4 are this design's choices.
// Combinational.
module rb_nb_converter
  import rb_mac_pkg::*;
#(
  parameter int unsigned N   = MAC_N,
  parameter int unsigned BLK = 4
) (
  input  logic [2*N-1:0] rp,
  input  logic [2*N-1:0] rn,
  output logic [2*N-1:0] s
);
  localparam int unsigned W  = 2 * N;
  localparam int unsigned NB = W / BLK;           // number of blocks
  localparam int unsigned L  = $clog2(NB);        // prefix levels

  logic [W-1:0]  a, b;
  logic [W-1:0]  s0, s1;                          // sums for block carry-in 0 / 1
  logic [NB-1:0] bg, bp;                          // block generate / propagate
  logic [NB-1:0] pg [L+1];
  logic [NB-1:0] pp [L+1];
  logic [NB:0]   cb;                              // carry into each block

  assign a = rp;
  assign b = ~rn;

  always_comb begin
    for (int k = 0; k < int'(NB); k++) begin
      logic c0, c1, g, p;
      c0 = 1'b0;
      c1 = 1'b1;
      g  = 1'b0;
      p  = 1'b1;
      for (int i = 0; i < int'(BLK); i++) begin
        int q;
        q = k * int'(BLK) + i;
        s0[q] = a[q] ^ b[q] ^ c0;
        s1[q] = a[q] ^ b[q] ^ c1;
        c0 = (a[q] & b[q]) | ((a[q] ^ b[q]) & c0);
        c1 = (a[q] & b[q]) | ((a[q] ^ b[q]) & c1);
        g  = (a[q] & b[q]) | ((a[q] ^ b[q]) & g);
        p  = p & (a[q] ^ b[q]);
      end
      bg[k] = g;
      bp[k] = p;
    end
  end

  // Kogge-Stone prefix over blocks: after L levels, pg[L][k] / pp[L][k]
  // span blocks 0..k.
  assign pg[0] = bg;
  assign pp[0] = bp;
  for (genvar l = 0; l < L; l++) begin : g_lvl
    for (genvar k = 0; k < NB; k++) begin : g_node
      if (k >= (1 << l)) begin : g_comb
        assign pg[l+1][k] = pg[l][k] | (pp[l][k] & pg[l][k - (1 << l)]);
        assign pp[l+1][k] = pp[l][k] & pp[l][k - (1 << l)];
      end else begin : g_pass
        assign pg[l+1][k] = pg[l][k];
        assign pp[l+1][k] = pp[l][k];
      end
    end
  end

  // Global carry-in is 1 (the +1 of rp + ~rn + 1).
  assign cb[0] = 1'b1;
  for (genvar k = 0; k < NB; k++) begin : g_cry
    assign cb[k+1] = pg[L][k] | pp[L][k];
  end

  for (genvar k = 0; k < NB; k++) begin : g_sel
    assign s[k*BLK +: BLK] = cb[k] ? s1[k*BLK +: BLK] : s0[k*BLK +: BLK];
  end
endmodule
