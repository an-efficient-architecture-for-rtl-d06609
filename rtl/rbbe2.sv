// rbbe2: RB Booth encoder block (RBBE-2) for one redundant-binary partial
// product row built from two adjacent radix-4 Booth rows.
//
// Row i combines Booth digits d_e = d(2i) and d_o = d(2i+1). The even row's
// multiple v_e = (|d_e| * x) ^ {neg_e} goes on the positive side at
// row-relative weight 2^0; the odd row's multiple v_o is inverted and goes on
// the negative side at weight 2^2. Inversion replaces the +4*S_o term by
// -4*~v_o plus constants, and those constants together with the two sign bits
// a = v_e[N], b = v_o[N] are folded into three local columns N..N+2:
//     pos[N] = a, pos[N+1] = a, pos[N+2] = ~a & ~b, neg[N+2] = a & b
// which equals -a + 4*~b (units 2^N), so the row carries no constant word.
// What is left is the row's error-correcting word: +neg_e at weight 2^0 and
// -~neg_o at weight 2^2. Both are returned as ecw_p / ecw_n and the
// generator places them in the free low columns of the next row (relative
// positions -4 and -2 there). Thus
//     value(row) + ecw_p - 4*ecw_n = d_e*x + 4*d_o*x.
// row_n[1:0] are always zero (the odd row starts two columns up).
// The document gives the function of this block; the column layout and the
// sign-extension folding above are this design's own derivation.
// Combinational.
module rbbe2
  import rb_mac_pkg::*;
#(
  parameter int unsigned N = MAC_N
) (
  input  logic [N-1:0] x,      // signed multiplicand
  input  booth_sel_t   sel_e,  // Booth digit 2i
  input  booth_sel_t   sel_o,  // Booth digit 2i+1
  output logic [N+2:0] row_p,  // positive bits, weight 2^(4i+k)
  output logic [N+2:0] row_n,  // negative bits, weight 2^(4i+k)
  output logic         ecw_p,  // +1 at weight 2^(4i), for the next row
  output logic         ecw_n   // -1 at weight 2^(4i+2), for the next row
);
  logic [N:0] xs, x2, ve, vo;
  logic       a, b;

  assign xs = {x[N-1], x};
  assign x2 = {x, 1'b0};

  always_comb begin
    ve = ({(N+1){sel_e.one}} & xs | {(N+1){sel_e.two}} & x2) ^ {(N+1){sel_e.neg}};
    vo = ({(N+1){sel_o.one}} & xs | {(N+1){sel_o.two}} & x2) ^ {(N+1){sel_o.neg}};
    a  = ve[N];
    b  = vo[N];
    row_p = {~a & ~b, a, a, ve[N-1:0]};
    row_n = {a & b, ~vo[N-1:0], 2'b00};
    ecw_p = sel_e.neg;
    ecw_n = ~sel_o.neg;
  end
endmodule
