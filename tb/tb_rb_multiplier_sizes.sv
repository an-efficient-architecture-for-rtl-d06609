// tb_rb_multiplier_sizes: the multiplier at the four word lengths compared
// in the stage-count table (8, 16, 32 and 64 bits). For each size it checks
// the number of RB accumulation stages of the reduction tree (1, 2, 3, 4:
// log2(N/4), one fewer than a generator with a separate correction word
// would need) and the signed product for extreme and random operands,
// against products computed here with 128-bit arithmetic.
module tb_rb_multiplier_sizes;
  logic [7:0]   x8,  y8;   logic [15:0]  p8;
  logic [15:0]  x16, y16;  logic [31:0]  p16;
  logic [31:0]  x32, y32;  logic [63:0]  p32;
  logic [63:0]  x64, y64;  logic [127:0] p64;
  int checks = 0, failures = 0;

  rb_multiplier #(.N(8))  dut8  (.x(x8),  .y(y8),  .p(p8));
  rb_multiplier #(.N(16)) dut16 (.x(x16), .y(y16), .p(p16));
  rb_multiplier #(.N(32)) dut32 (.x(x32), .y(y32), .p(p32));
  rb_multiplier #(.N(64)) dut64 (.x(x64), .y(y64), .p(p64));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_stages(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d accumulation stages, expected %0d", name, got, exp);
    end
  endtask

  task automatic check(int n, logic [127:0] got, logic [127:0] exp);
    logic [127:0] mask;
    mask = (n == 64) ? '1 : ((128'd1 << (2 * n)) - 1);
    checks++;
    if ((got & mask) !== (exp & mask)) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d got %h exp %h", n, got, exp);
    end
  endtask

  function automatic logic [63:0] pick(int t, int n);
    logic [63:0] r;
    r = {$urandom, $urandom};
    case (t % 7)
      0: r = 64'd0;
      1: r = '1;                                  // -1
      2: r = 64'd1 << (n - 1);                    // most negative
      3: r = (64'd1 << (n - 1)) - 1;              // most positive
      default: ;
    endcase
    return r;
  endfunction

  initial begin
    check_stages("8x8",   dut8.u_tree.S,  1);
    check_stages("16x16", dut16.u_tree.S, 2);
    check_stages("32x32", dut32.u_tree.S, 3);
    check_stages("64x64", dut64.u_tree.S, 4);
    for (int t = 0; t < 3000; t++) begin
      logic [63:0] a, b;
      a = pick(t, 8);      b = pick(t / 7, 8);
      x8 = a[7:0];         y8 = b[7:0];
      a = pick(t, 16);     b = pick(t / 7, 16);
      x16 = a[15:0];       y16 = b[15:0];
      a = pick(t, 32);     b = pick(t / 7, 32);
      x32 = a[31:0];       y32 = b[31:0];
      a = pick(t, 64);     b = pick(t / 7, 64);
      x64 = a;             y64 = b;
      #1;
      check(8,  128'(p8),  128'(16'($signed(x8) * $signed(y8))));
      check(16, 128'(p16), 128'(32'(longint'($signed(x16)) * longint'($signed(y16)))));
      check(32, 128'(p32), 128'(64'(longint'($signed(x32)) * longint'($signed(y32)))));
      check(64, p64, 128'($signed({{64{x64[63]}}, x64}) * $signed({{64{y64[63]}}, y64})));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
