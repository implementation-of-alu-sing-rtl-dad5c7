// tb_arithmetic_unit: checks add, subtract, multiply and the unused code.
// Each operation gets corner operands and random ones; expected results
// are computed with the simulator's own arithmetic: {carry, a + b},
// {borrow, a - b}, the 64-bit product, and 0 for the unused code.
// A watchdog ends the run after 10 ms.
module tb_arithmetic_unit;
  import alu_pkg::*;

  logic [OP_W-1:0]  a, b;
  arith_op_e        op;
  logic [RES_W-1:0] y;
  int               checks = 0, failures = 0;

  arithmetic_unit dut (.a(a), .b(b), .op(op), .y(y));

  function automatic logic [RES_W-1:0] model(arith_op_e o, logic [OP_W-1:0] x, logic [OP_W-1:0] z);
    case (o)
      ARITH_ADD: return RES_W'(33'(x) + 33'(z));
      ARITH_SUB: return RES_W'({x < z, x - z});
      ARITH_MUL: return RES_W'(64'(x) * 64'(z));
      default:   return '0;
    endcase
  endfunction

  task automatic check(arith_op_e o, logic [OP_W-1:0] x, logic [OP_W-1:0] z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== model(o, x, z)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h expected %h", o.name(), x, z, y, model(o, x, z));
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
    arith_op_e ops[4] = '{ARITH_ADD, ARITH_SUB, ARITH_MUL, ARITH_NONE};
    foreach (ops[i]) begin
      check(ops[i], '1, 32'd1);
      check(ops[i], 32'd0, 32'd1);
      check(ops[i], 32'd20, 32'd10);
      check(ops[i], 32'd10, 32'd20);
      check(ops[i], '1, '1);
      check(ops[i], 32'h8000_0000, 32'h8000_0000);
      for (int k = 0; k < 3000; k++) check(ops[i], $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
