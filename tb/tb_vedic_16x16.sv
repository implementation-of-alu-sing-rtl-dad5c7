// tb_vedic_16x16: checks the 16x16 multiplier against a * b.
// Corner operands (0, 1, all ones, single bits) and random operands are
// applied; the 33-bit output must equal the product, with c[32] = 0.
// A watchdog ends the run after 10 ms.
module tb_vedic_16x16;

  logic [15:0] a, b;
  logic [32:0] c;
  int          checks = 0, failures = 0;

  vedic_16x16 dut (.a(a), .b(b), .c(c));

  task automatic check(logic [15:0] x, logic [15:0] y);
    logic [32:0] ref_v;
    a = x; b = y;
    #1;
    ref_v = 33'(x) * 33'(y);
    checks++;
    if (c !== ref_v) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", x, y, c, ref_v);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'd0, 16'hffff);
    check(16'd1, 16'hffff);
    check(16'hffff, 16'hffff);
    check(16'd20, 16'd10);
    for (int i = 0; i < 16; i++) check(16'(1) << i, 16'hffff);
    for (int k = 0; k < 20000; k++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
