// tb_rb_adder: checks the carry-free RB adder. Two instances: one with
// RB full adders in every column (B_LO = 0) and one whose 12 low columns
// are RB half adders (B_LO = 12, operand b zero there). For random RB
// operands the sum (zp - zn) must equal (ap - an) + (bp - bn) modulo 2^64.
module tb_rb_adder;
  logic [63:0] ap, an, bp, bn, bp2, bn2, zp, zn, zp2, zn2;
  int checks = 0, failures = 0;

  rb_adder #(.W(64), .B_LO(0))  dut0 (.ap(ap), .an(an), .bp(bp),  .bn(bn),  .zp(zp),  .zn(zn));
  rb_adder #(.W(64), .B_LO(12)) dut1 (.ap(ap), .an(an), .bp(bp2), .bn(bn2), .zp(zp2), .zn(zn2));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [63:0] e0, e1;
      ap = {$urandom, $urandom};
      an = {$urandom, $urandom};
      bp = {$urandom, $urandom};
      bn = {$urandom, $urandom};
      if (t == 0) begin ap = '1; an = '0; bp = '1; bn = '0; end
      if (t == 1) begin ap = '0; an = '1; bp = '0; bn = '1; end
      bp2 = bp & ~64'hfff;
      bn2 = bn & ~64'hfff;
      #1;
      e0 = (ap - an) + (bp - bn);
      e1 = (ap - an) + (bp2 - bn2);
      checks += 2;
      if (zp - zn !== e0) begin
        failures++;
        if (failures < 10) $display("FAIL full: got %h exp %h", zp - zn, e0);
      end
      if (zp2 - zn2 !== e1) begin
        failures++;
        if (failures < 10) $display("FAIL half: got %h exp %h", zp2 - zn2, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
