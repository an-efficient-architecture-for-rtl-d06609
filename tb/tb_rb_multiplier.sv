// tb_rb_multiplier: checks the 32 x 32 signed RB multiplier against the
// product computed here with 64-bit integers, for all pairs of a set of
// extreme operands and for random operands.
module tb_rb_multiplier;
  logic [31:0] x, y;
  logic [63:0] p;
  int checks = 0, failures = 0;

  rb_multiplier dut (.x(x), .y(y), .p(p));

  logic [31:0] corners [8] = '{32'h0, 32'h1, 32'h2, 32'hffff_ffff, 32'h7fff_ffff,
                               32'h8000_0000, 32'haaaa_aaaa, 32'h8000_0001};

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [63:0] e;
    #1;
    e = 64'(longint'($signed(x)) * longint'($signed(y)));
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, exp %h", x, y, p, e);
    end
  endtask

  initial begin
    foreach (corners[i]) foreach (corners[j]) begin
      x = corners[i];
      y = corners[j];
      check();
    end
    for (int t = 0; t < 5000; t++) begin
      x = $urandom;
      y = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
