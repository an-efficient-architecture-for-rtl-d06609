// tb_rbpp_tree: checks the three-stage RB reduction tree with random RB
// rows shaped like the generator's output (row i is zero below column
// 4i-4). The tree's RB result must equal the sum of the rows modulo 2^64.
module tb_rbpp_tree;
  localparam int unsigned N = 32;
  localparam int unsigned R = N / 4;
  logic [2*N-1:0] pp_p [R];
  logic [2*N-1:0] pp_n [R];
  logic [2*N-1:0] sp, sn;
  int checks = 0, failures = 0;

  rbpp_tree #(.N(N)) dut (.pp_p(pp_p), .pp_n(pp_n), .sp(sp), .sn(sn));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [2*N-1:0] e;
      e = '0;
      for (int i = 0; i < int'(R); i++) begin
        logic [63:0] m;
        m = (i == 0) ? '1 : ~((64'd1 << (4 * i - 4)) - 1);
        pp_p[i] = {$urandom, $urandom} & m;
        pp_n[i] = {$urandom, $urandom} & m;
        if (t == 0) begin pp_p[i] = m; pp_n[i] = '0; end
        if (t == 1) begin pp_p[i] = '0; pp_n[i] = m; end
        e += pp_p[i] - pp_n[i];
      end
      #1;
      checks++;
      if (sp - sn !== e) begin
        failures++;
        if (failures < 10) $display("FAIL got %h exp %h", sp - sn, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
