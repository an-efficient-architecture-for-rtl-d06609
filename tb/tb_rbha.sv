// tb_rbha: exhaustive check of the RB half adder cell: it must behave as
// the RB full adder with a zero second digit, i.e.
// ap + ~an + 0 + 1 + h_in = zp + 2*(h_out + c_out), h_out = ap & ~an,
// zn = ~c_in.
module tb_rbha;
  logic ap, an, h_in, c_in, zp, zn, h_out, c_out;
  int checks = 0, failures = 0;

  rbha dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int lhs, rhs;
      {ap, an, h_in, c_in} = 4'(v);
      #1;
      lhs = int'(ap) + int'(!an) + 1 + int'(h_in);
      rhs = int'(zp) + 2 * (int'(h_out) + int'(c_out));
      checks++;
      if (lhs != rhs || zn !== !c_in || h_out !== (ap & !an)) begin
        failures++;
        $display("FAIL in=%b zp=%b zn=%b h=%b c=%b", v[3:0], zp, zn, h_out, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
