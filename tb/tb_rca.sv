// tb_rca: checks the 64-bit ripple-carry adder: {cout, s} must equal
// a + b + cin for random operands and for the full-length carry case.
module tb_rca;
  logic [63:0] a, b, s;
  logic        cin, cout;
  int checks = 0, failures = 0;

  rca #(.W(64)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [64:0] e;
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      cin = 1'($urandom);
      if (t == 0) begin a = '1; b = '0; cin = 1'b1; end
      if (t == 1) begin a = '1; b = '1; cin = 1'b1; end
      #1;
      e = 65'(a) + 65'(b) + 65'(cin);
      checks++;
      if ({cout, s} !== e) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h + %b = %h, exp %h", a, b, cin, {cout, s}, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
