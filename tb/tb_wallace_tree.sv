// tb_wallace_tree: checks that the carry-save tree keeps the sum of its rows.
// Three instances are tested: the default 16 rows of 32 bits (rows are
// 16-bit values shifted as in a 16x16 multiplier, so the total fits),
// 3 rows of 64 bits as used by the 32x32 multiplier, and 5 rows of 16 bits
// (rows below 2**12). For each, sum_o + carry_o must equal the arithmetic
// total of the rows. A watchdog ends the run after 10 ms.
module tb_wallace_tree;

  logic [15:0][31:0] r16;
  logic [31:0]       s16, c16;
  logic [2:0][63:0]  r3;
  logic [63:0]       s3, c3;
  logic [4:0][15:0]  r5;
  logic [15:0]       s5, c5;
  int                checks = 0, failures = 0;

  wallace_tree dut16 (.rows_i(r16), .sum_o(s16), .carry_o(c16));
  wallace_tree #(.ROWS(3), .W(64)) dut3 (.rows_i(r3), .sum_o(s3), .carry_o(c3));
  wallace_tree #(.ROWS(5), .W(16)) dut5 (.rows_i(r5), .sum_o(s5), .carry_o(c5));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned tot;
    for (int k = 0; k < 5000; k++) begin
      tot = 0;
      for (int j = 0; j < 16; j++) begin
        r16[j] = (k == 0) ? (32'hffff << j) : (32'($urandom_range(0, 65535)) << j);
        tot += 64'(r16[j]);
      end
      for (int j = 0; j < 3; j++) r3[j] = (k == 0) ? 64'h3fff_ffff_ffff_ffff
                                                   : {2'b0, 30'($urandom), 32'($urandom)};
      for (int j = 0; j < 5; j++) r5[j] = 16'($urandom_range(0, 4095));
      #1;
      checks++;
      if (64'(s16) + 64'(c16) !== tot) begin
        failures++;
        $display("FAIL16 got %0d expected %0d", 64'(s16) + 64'(c16), tot);
      end
      checks++;
      if (s3 + c3 !== r3[0] + r3[1] + r3[2]) begin
        failures++;
        $display("FAIL3 got %h", s3 + c3);
      end
      checks++;
      if (s5 + c5 !== r5[0] + r5[1] + r5[2] + r5[3] + r5[4]) begin
        failures++;
        $display("FAIL5 got %h", s5 + c5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
