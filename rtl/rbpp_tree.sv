// rbpp_tree: RB partial product reduction tree.
//
// Adds the N/4 RB rows of the generator in log2(N/4) stages of rb_adder,
// pairing neighbouring nodes at every stage: for N = 32, 8 rows -> 4 -> 2 ->
// 1, i.e. three accumulation stages, one fewer than a generator that needs an
// extra correction-word row (9 rows need four stages). Each adder's columns
// below the lowest possibly nonzero column of its second operand use RB half
// adders. The output is one 2N-digit RB number (sp - sn) equal to the sum of
// the rows modulo 2^(2N). Combinational; the delay is log2(N/4) RB adder
// delays, independent of the word length.
module rbpp_tree
  import rb_mac_pkg::*;
#(
  parameter int unsigned N = MAC_N
) (
  input  logic [2*N-1:0] pp_p [N/4],
  input  logic [2*N-1:0] pp_n [N/4],
  output logic [2*N-1:0] sp,
  output logic [2*N-1:0] sn
);
  localparam int unsigned R = N / 4;
  localparam int unsigned S = $clog2(R);   // accumulation stages

  // g_stage[s].np / nn: the nodes left after stage s (s = 1..S).
  for (genvar s = 1; s <= S; s++) begin : g_stage
    localparam int unsigned NODES = R >> s;
    logic [2*N-1:0] np [NODES];
    logic [2*N-1:0] nn [NODES];
    for (genvar j = 0; j < NODES; j++) begin : g_add
      // first generator row of the second operand, and its lowest column
      localparam int unsigned BROW = (2 * j + 1) << (s - 1);
      localparam int unsigned BLO  = 4 * BROW - 4;
      logic [2*N-1:0] ap, an, bp, bn;
      if (s == 1) begin : g_first
        assign ap = pp_p[2*j];
        assign an = pp_n[2*j];
        assign bp = pp_p[2*j+1];
        assign bn = pp_n[2*j+1];
      end else begin : g_next
        assign ap = g_stage[s-1].np[2*j];
        assign an = g_stage[s-1].nn[2*j];
        assign bp = g_stage[s-1].np[2*j+1];
        assign bn = g_stage[s-1].nn[2*j+1];
      end
      rb_adder #(.W(2 * N), .B_LO(BLO)) u_add (
        .ap(ap), .an(an), .bp(bp), .bn(bn), .zp(np[j]), .zn(nn[j])
      );
    end
  end

  assign sp = g_stage[S].np[0];
  assign sn = g_stage[S].nn[0];
endmodule
