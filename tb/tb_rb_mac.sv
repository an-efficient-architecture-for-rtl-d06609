// tb_rb_mac: end-to-end test of the 32-bit MAC at its default size.
//
// Drives a random stream of operands with random en and clr against a
// cycle-accurate reference model (acc = {carry, sum} of acc[63:0] + a*b,
// computed here with 64-bit integers). Every cycle it checks the
// combinational product and the accumulator one edge after the operands
// were applied (one MAC per clock). Some phases use large operands of the
// same sign so the 64-bit sum carries out. It counts how often each
// mechanism of the unit happened (accumulate, hold with en low, clear,
// carry-out into bit 64, negative product, asynchronous reset) and counts a
// failure for any that never did.
module tb_rb_mac;
  logic        clk = 0, rst_n = 1, clr = 0, en = 0;
  logic [31:0] a = '0, b = '0;
  logic [63:0] product;
  logic [64:0] acc, model;
  int checks = 0, failures = 0;
  int n_acc = 0, n_hold = 0, n_clr = 0, n_carry = 0, n_neg = 0, n_rst = 0;

  rb_mac dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(a), .b(b),
              .product(product), .acc(acc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [64:0] got, logic [64:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h (a=%h b=%h)", what, got, exp, a, b);
    end
  endtask

  task automatic cycle(logic [31:0] na, logic [31:0] nb, logic nen, logic nclr);
    logic [63:0] p;
    @(negedge clk);
    a = na; b = nb; en = nen; clr = nclr;
    #1;
    p = 64'(longint'($signed(a)) * longint'($signed(b)));
    expect_eq("product", {1'b0, product}, {1'b0, p});
    if ($signed(p) < 0) n_neg++;
    @(posedge clk);
    if (clr) begin
      model = '0;
      n_clr++;
    end else if (en) begin
      model = 65'(model[63:0]) + 65'(p);
      n_acc++;
      if (model[64]) n_carry++;
    end else begin
      n_hold++;
    end
    #1;
    expect_eq("acc", acc, model);
  endtask

  initial begin
    model = '0;
    #1 rst_n = 0;
    #2;
    expect_eq("reset", acc, '0);
    n_rst++;
    rst_n = 1;
    // a short dot product: 1*2 + 3*4 + (-5)*6 = -16
    cycle(32'd1, 32'd2, 1'b1, 1'b0);
    cycle(32'd3, 32'd4, 1'b1, 1'b0);
    cycle(-32'sd5, 32'd6, 1'b1, 1'b0);
    expect_eq("dot product", acc, {1'b0, 64'hffff_ffff_ffff_fff0});
    cycle(32'd7, 32'd7, 1'b0, 1'b0);   // hold
    cycle(32'd7, 32'd7, 1'b1, 1'b1);   // clear wins over en
    for (int t = 0; t < 4000; t++) begin
      logic [31:0] na, nb;
      na = $urandom;
      nb = $urandom;
      if ((t / 500) % 2 == 1) begin     // same-sign large operands: carries
        na = {1'b0, 1'b1, na[29:0]};
        nb = {1'b0, 1'b1, nb[29:0]};
      end
      cycle(na, nb, ($urandom % 4) != 0, ($urandom % 64) == 0);
    end
    // asynchronous reset in the middle of operation
    @(negedge clk);
    en = 1'b0;
    rst_n = 0;
    #1;
    model = '0;
    n_rst++;
    expect_eq("async reset", acc, '0);
    rst_n = 1;
    cycle(32'h8000_0000, 32'h8000_0000, 1'b1, 1'b0);
    expect_eq("max product", acc, {1'b0, 64'h4000_0000_0000_0000});

    $display("mechanisms: accumulate=%0d hold=%0d clear=%0d carry=%0d negative=%0d reset=%0d",
             n_acc, n_hold, n_clr, n_carry, n_neg, n_rst);
    checks++;
    if (n_acc == 0 || n_hold == 0 || n_clr == 0 || n_carry == 0 || n_neg == 0 || n_rst < 2) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
