// tb_vedic_32x32: checks the 32x32 multiplier against a * b.
// Corner operands (0, 1, all ones, single bits) and random operands are
// applied; the 33-bit output must equal the product, with c[64] = 0.
// Operands with only high or only low halves set exercise each of the
// four 16x16 blocks on its own. A watchdog ends the run after 10 ms.
module tb_vedic_32x32;

  logic [31:0] a, b;
  logic [64:0] c;
  int          checks = 0, failures = 0;

  vedic_32x32 dut (.a(a), .b(b), .c(c));

  task automatic check(logic [31:0] x, logic [31:0] y);
    logic [64:0] ref_v;
    a = x; b = y;
    #1;
    ref_v = 65'(x) * 65'(y);
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
    check(32'd0, 32'hffff_ffff);
    check(32'd1, 32'hffff_ffff);
    check(32'hffff_ffff, 32'hffff_ffff);
    check(32'd20, 32'd10);  // 20 x 10 = 200, the reference example
    check(32'h0001_0000, 32'h0001_0000);
    check(32'hffff_0000, 32'h0000_ffff);
    for (int i = 0; i < 32; i++) check(32'(1) << i, 32'hffff_ffff);
    for (int k = 0; k < 20000; k++) check(32'($urandom), 32'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
