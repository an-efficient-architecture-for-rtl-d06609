// tb_pipo_reg: checks the PIPO accumulator register cycle by cycle against
// a reference model: asynchronous reset to zero, parallel load when en,
// hold when not, and synchronous clear taking priority over load.
module tb_pipo_reg;
  localparam int unsigned W = 65;
  logic         clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  pipo_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      d   = {1'($urandom), $urandom, $urandom};
      en  = 1'($urandom);
      clr = ($urandom % 8) == 0;
      @(posedge clk);
      if (clr) model = '0;
      else if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d q=%h exp %h", t, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
