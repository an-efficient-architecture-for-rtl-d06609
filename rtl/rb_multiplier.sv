// rb_multiplier: N x N signed redundant-binary multiplier (N = 32 by
// default), p = x * y as a 2N-bit two's-complement number.
//
// Three parts, all combinational:
//   rbmppg2          radix-4 Booth encoding and N/4 RB partial product rows
//                    with no extra correction-word row (8 rows for N = 32);
//   rbpp_tree        log2(N/4) carry-free RB accumulation stages (3 for 32);
//   rb_nb_converter  the single carry-propagating step, RB to two's
//                    complement, with a parallel-prefix/carry-select adder.
// Operands are taken as signed two's complement, which is what modified
// Booth encoding computes; the document does not state the signedness.
module rb_multiplier
  import rb_mac_pkg::*;
#(
  parameter int unsigned N = MAC_N
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  logic [2*N-1:0] pp_p [N/4];
  logic [2*N-1:0] pp_n [N/4];
  logic [2*N-1:0] sp, sn;

  rbmppg2         #(.N(N)) u_ppg  (.x(x), .y(y), .pp_p(pp_p), .pp_n(pp_n));
  rbpp_tree       #(.N(N)) u_tree (.pp_p(pp_p), .pp_n(pp_n), .sp(sp), .sn(sn));
  rb_nb_converter #(.N(N)) u_conv (.rp(sp), .rn(sn), .s(p));
endmodule
