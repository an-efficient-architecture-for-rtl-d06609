// rbmppg2: RB modified partial product generator (RBMPPG-2).
//
// An N x N signed product needs N/2 radix-4 Booth rows. Pairs of adjacent
// Booth rows form N/4 redundant-binary (RB) rows (eight for N = 32). A
// conventional RB Booth generator also needs one extra error-correcting word
// (ECW) that collects the +1 bits of the negative Booth rows and the
// constants of sign extension and inversion, making N/4 + 1 rows and costing
// one more accumulation stage. Here no ECW row exists:
//   * each rbbe2 row absorbs its own sign-extension constants (see rbbe2);
//   * the two correction bits of row i are placed in row i+1, in columns
//     4i (positive side) and 4i+2 (negative side), which that row leaves
//     empty because it starts at column 4i+4;
//   * the last row (rbbe2_last) takes its two Booth digits as one radix-16
//     digit and is written as a difference of two multiples, so it produces
//     no correction bits.
// The document moves each ECW to the next row as done here; for the last row
// it merges the correction by logic simplification without giving the
// equations, and rbbe2_last is this design's way of doing that.
// Output rows are 2N-column vectors; columns outside a row's span are
// constant zero (row i spans columns 4i-4 .. 4i+N+2, the last row N-8 ..
// 2N-1), which the reduction tree uses to place its half adders. The
// value sum_i (pp_p[i] - pp_n[i]) equals
// x*y modulo 2^(2N). Combinational. N must be a power of two, at least 8.
module rbmppg2
  import rb_mac_pkg::*;
#(
  parameter int unsigned N = MAC_N
) (
  input  logic [N-1:0]   x,                // signed multiplicand
  input  logic [N-1:0]   y,                // signed multiplier
  output logic [2*N-1:0] pp_p [N/4],       // positive vectors of the RB rows
  output logic [2*N-1:0] pp_n [N/4]        // negative vectors of the RB rows
);
  localparam int unsigned R = N / 4;       // number of RB rows
  localparam int unsigned D = N / 2;       // number of Booth digits

  booth_sel_t   sel [D-2];
  logic [N:0]   yx;                        // multiplier with y[-1] = 0
  logic [N+2:0] rp [R-1];
  logic [N+2:0] rn [R-1];
  logic         ecw_p [R-1];
  logic         ecw_n [R-1];
  logic [N+3:0] lp, ln;

  assign yx = {y, 1'b0};

  for (genvar j = 0; j < D - 2; j++) begin : g_enc
    mbe_encoder u_enc (.y3(yx[2*j+2 -: 3]), .sel(sel[j]));
  end

  for (genvar i = 0; i < R - 1; i++) begin : g_row
    rbbe2 #(.N(N)) u_rbbe2 (
      .x(x), .sel_e(sel[2*i]), .sel_o(sel[2*i+1]),
      .row_p(rp[i]), .row_n(rn[i]), .ecw_p(ecw_p[i]), .ecw_n(ecw_n[i])
    );
  end

  rbbe2_last #(.N(N)) u_last (.x(x), .y5(yx[N -: 5]), .row_p(lp), .row_n(ln));

  // Row placement: row i at column 4i, ECW of row i-1 at columns 4i-4, 4i-2.
  always_comb begin
    for (int i = 0; i < int'(R); i++) begin
      pp_p[i] = '0;
      pp_n[i] = '0;
      if (i < int'(R) - 1) begin
        pp_p[i][4*i +: N+3] = rp[i];
        pp_n[i][4*i +: N+3] = rn[i];
      end else begin
        pp_p[i][2*N-1 -: N+4] = lp;
        pp_n[i][2*N-1 -: N+4] = ln;
      end
      if (i > 0) begin
        pp_p[i][4*i-4] = ecw_p[i-1];
        pp_n[i][4*i-2] = ecw_n[i-1];
      end
    end
  end
endmodule
