// tb_brent_kung_adder: checks the prefix adder against a + b + cin.
// The 32-bit default instance gets corner cases (carry rippling through all
// bits) and random operands; an 8-bit instance is checked exhaustively
// over all a, b and cin. A watchdog ends the run after 10 ms.
module tb_brent_kung_adder;

  logic [31:0] a32, b32, s32;
  logic        c32, cin32;
  logic [7:0]  a8, b8, s8;
  logic        c8, cin8;
  int          checks = 0, failures = 0;

  brent_kung_adder dut32 (.a(a32), .b(b32), .cin(cin32), .sum(s32), .cout(c32));
  brent_kung_adder #(.W(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .sum(s8), .cout(c8));

  task automatic check32(logic [31:0] x, logic [31:0] y, logic ci);
    logic [32:0] ref_v;
    a32 = x; b32 = y; cin32 = ci;
    #1;
    ref_v = 33'(x) + 33'(y) + 33'(ci);
    checks++;
    if ({c32, s32} !== ref_v) begin
      failures++;
      $display("FAIL32 %h + %h + %0b = %h, expected %h", x, y, ci, {c32, s32}, ref_v);
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
    check32('1, 32'd0, 1'b1);
    check32('1, 32'd1, 1'b0);
    check32('1, '1, 1'b1);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    check32(32'h5555_5555, 32'haaaa_aaaa, 1'b1);
    check32(32'd0, 32'd0, 1'b0);
    for (int k = 0; k < 20000; k++) check32($urandom, $urandom, 1'($urandom));
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        for (int ci = 0; ci < 2; ci++) begin
          a8 = 8'(x); b8 = 8'(y); cin8 = 1'(ci);
          #1;
          checks++;
          if ({c8, s8} !== 9'(x + y + ci)) begin
            failures++;
            $display("FAIL8 %0d + %0d + %0d = %0d", x, y, ci, {c8, s8});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
