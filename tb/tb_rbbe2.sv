// tb_rbbe2: checks one RB partial product row. For random multiplicands
// (plus the extremes) and all 25 pairs of Booth digits, the row value
// sum(row_p - row_n) plus its correction bits (+ecw_p at weight 1,
// -ecw_n at weight 4) must equal d_e*x + 4*d_o*x, computed here in 64-bit
// integer arithmetic.
module tb_rbbe2;
  import rb_mac_pkg::*;
  localparam int unsigned N = 32;
  logic [N-1:0] x;
  booth_sel_t   se, so;
  logic [N+2:0] rp, rn;
  logic         ep, en;
  int checks = 0, failures = 0;

  rbbe2 #(.N(N)) dut (.x(x), .sel_e(se), .sel_o(so), .row_p(rp), .row_n(rn), .ecw_p(ep), .ecw_n(en));

  function automatic booth_sel_t enc(int d);
    booth_sel_t s;
    s.one = (d == 1 || d == -1);
    s.two = (d == 2 || d == -2);
    s.neg = (d < 0);
    return s;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      case (t)
        0: x = 32'h8000_0000;
        1: x = 32'h7fff_ffff;
        2: x = 32'hffff_ffff;
        3: x = 32'h0;
        default: x = $urandom;
      endcase
      for (int de = -2; de <= 2; de++) begin
        for (int dd = -2; dd <= 2; dd++) begin
          longint v, e;
          se = enc(de);
          so = enc(dd);
          #1;
          v = 0;
          for (int k = 0; k < N + 3; k++) v += (longint'(rp[k]) - longint'(rn[k])) <<< k;
          v += longint'(ep) - 4 * longint'(en);
          e = longint'(de) * longint'($signed(x)) + 4 * longint'(dd) * longint'($signed(x));
          checks++;
          if (v != e) begin
            failures++;
            if (failures < 10) $display("FAIL x=%h de=%0d do=%0d got %0d exp %0d", x, de, dd, v, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
