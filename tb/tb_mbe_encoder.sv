// tb_mbe_encoder: exhaustive check of the radix-4 Booth encoder. For all
// eight triplets the digit d = -2*y2 + y1 + y0 is computed here and the
// outputs must satisfy one = (|d| == 1), two = (|d| == 2), neg = (d < 0).
module tb_mbe_encoder;
  import rb_mac_pkg::*;
  logic [2:0] y3;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  mbe_encoder dut (.y3(y3), .sel(sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int d;
      y3 = 3'(v);
      #1;
      d = -2 * int'(y3[2]) + int'(y3[1]) + int'(y3[0]);
      checks++;
      if (sel.one !== (d == 1 || d == -1) || sel.two !== (d == 2 || d == -2) || sel.neg !== (d < 0)) begin
        failures++;
        $display("FAIL y3=%b d=%0d sel=%b", y3, d, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
