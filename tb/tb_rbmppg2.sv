// tb_rbmppg2: checks the partial product generator. For extreme and
// random signed operands the N/4 rows must add, as RB numbers modulo
// 2^(2N), to x*y computed here. It also checks that no row has digits
// below its allowed lowest column (4i-4), which the reduction tree relies on.
module tb_rbmppg2;
  import rb_mac_pkg::*;
  localparam int unsigned N = 32;
  localparam int unsigned R = N / 4;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] pp_p [R];
  logic [2*N-1:0] pp_n [R];
  int checks = 0, failures = 0;

  rbmppg2 #(.N(N)) dut (.x(x), .y(y), .pp_p(pp_p), .pp_n(pp_n));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] corners [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff, 32'h8000_0000, 32'h5555_5555};

  task automatic check();
    logic [2*N-1:0] sum, e;
    #1;
    sum = '0;
    for (int i = 0; i < int'(R); i++) begin
      sum += pp_p[i] - pp_n[i];
      if (i > 0) begin
        checks++;
        if (((pp_p[i] | pp_n[i]) & ((64'd1 << (4 * i - 4)) - 1)) != 0) begin
          failures++;
          $display("FAIL row %0d has digits below column %0d", i, 4 * i - 4);
        end
      end
    end
    e = 64'(longint'($signed(x)) * longint'($signed(y)));
    checks++;
    if (sum !== e) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h y=%h got %h exp %h", x, y, sum, e);
    end
  endtask

  initial begin
    foreach (corners[i]) foreach (corners[j]) begin
      x = corners[i];
      y = corners[j];
      check();
    end
    for (int t = 0; t < 3000; t++) begin
      x = $urandom;
      y = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
