// tb_rbbe2_last: checks the last RB row. For random and extreme
// multiplicands and all 32 values of the top five multiplier bits, the two
// Booth digits d_e = -2*y2 + y1 + y0 and d_o = -2*y4 + y3 + y2 are formed
// here, and row_p - row_n modulo 2^(N+4) must equal (d_e + 4*d_o)*x.
module tb_rbbe2_last;
  localparam int unsigned N = 32;
  logic [N-1:0] x;
  logic [4:0]   y5;
  logic [N+3:0] rp, rn;
  int checks = 0, failures = 0;

  rbbe2_last #(.N(N)) dut (.x(x), .y5(y5), .row_p(rp), .row_n(rn));

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
        4: x = 32'h1;
        default: x = $urandom;
      endcase
      for (int v = 0; v < 32; v++) begin
        logic [N+3:0] got, e;
        int de, dd;
        y5 = 5'(v);
        #1;
        de = -2 * int'(y5[2]) + int'(y5[1]) + int'(y5[0]);
        dd = -2 * int'(y5[4]) + int'(y5[3]) + int'(y5[2]);
        got = rp - rn;
        e = (N+4)'(longint'(de + 4 * dd) * longint'($signed(x)));
        checks++;
        if (got !== e) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h y5=%b got %h exp %h", x, y5, got, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
