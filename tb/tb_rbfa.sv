// tb_rbfa: exhaustive check of the RB full adder cell over its 64 input
// combinations. The cell is a 4:2 compressor on (ap, ~an, bp, ~bn), so
// ap + ~an + bp + ~bn + h_in must equal zp + 2*(h_out + c_out); the
// transfer h_out must not depend on h_in; and zn must be ~c_in.
module tb_rbfa;
  logic ap, an, bp, bn, h_in, c_in, zp, zn, h_out, c_out;
  int checks = 0, failures = 0;

  rbfa dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int lhs, rhs, maj;
      {ap, an, bp, bn, h_in, c_in} = 6'(v);
      #1;
      lhs = int'(ap) + int'(!an) + int'(bp) + int'(!bn) + int'(h_in);
      rhs = int'(zp) + 2 * (int'(h_out) + int'(c_out));
      maj = int'(ap) + int'(!an) + int'(bp);
      checks++;
      if (lhs != rhs || zn !== !c_in || h_out !== (maj >= 2)) begin
        failures++;
        $display("FAIL in=%b zp=%b zn=%b h=%b c=%b", v[5:0], zp, zn, h_out, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
