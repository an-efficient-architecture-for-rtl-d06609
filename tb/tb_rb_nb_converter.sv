// tb_rb_nb_converter: checks the RB to two's-complement converter with
// random and extreme RB words: s must equal rp - rn modulo 2^64. The
// extremes make the carry run the whole word (rp = rn, rp = 0 with rn = 1).
module tb_rb_nb_converter;
  logic [63:0] rp, rn, s;
  int checks = 0, failures = 0;

  rb_nb_converter #(.N(32)) dut (.rp(rp), .rn(rn), .s(s));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      rp = {$urandom, $urandom};
      rn = {$urandom, $urandom};
      case (t)
        0: begin rp = 64'h0; rn = 64'h1; end
        1: begin rp = 64'h1234_5678_9abc_def0; rn = rp; end
        2: begin rp = '1; rn = '0; end
        3: begin rp = '0; rn = '1; end
        4: begin rp = 64'h8000_0000_0000_0000; rn = 64'h1; end
        default: ;
      endcase
      #1;
      checks++;
      if (s !== rp - rn) begin
        failures++;
        if (failures < 10) $display("FAIL rp=%h rn=%h got %h exp %h", rp, rn, s, rp - rn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
