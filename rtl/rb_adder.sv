// rb_adder: W-digit carry-free redundant-binary adder (one RBPP
// accumulation block).
//
// Z = A + B (mod 2^W) where A = ap - an, B = bp - bn, Z = zp - zn. Column k
// is an rbfa, or an rbha when k < B_LO, i.e. where the caller guarantees
// B's digits are zero. Column 0 takes h_in = 0 and c_in = 1; the transfer
// and carry leaving column W-1 are dropped (modulo 2^W). Every output digit
// depends on at most three neighbouring columns, so the delay is constant
// in W. Combinational.
module rb_adder #(
  parameter int unsigned W    = 64,
  parameter int unsigned B_LO = 0    // columns below this use rbha
) (
  input  logic [W-1:0] ap, an,
  input  logic [W-1:0] bp, bn,
  output logic [W-1:0] zp, zn
);
  logic [W:0] h, c;

  assign h[0] = 1'b0;
  assign c[0] = 1'b1;

  for (genvar k = 0; k < W; k++) begin : g_col
    if (k < B_LO) begin : g_ha
      rbha u_ha (.ap(ap[k]), .an(an[k]), .h_in(h[k]), .c_in(c[k]),
                 .zp(zp[k]), .zn(zn[k]), .h_out(h[k+1]), .c_out(c[k+1]));
    end else begin : g_fa
      rbfa u_fa (.ap(ap[k]), .an(an[k]), .bp(bp[k]), .bn(bn[k]), .h_in(h[k]), .c_in(c[k]),
                 .zp(zp[k]), .zn(zn[k]), .h_out(h[k+1]), .c_out(c[k+1]));
    end
  end
endmodule
