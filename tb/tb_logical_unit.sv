// tb_logical_unit: checks the eight bitwise logic operations.
// Every operation is applied to patterned and random operands and compared
// with the corresponding SystemVerilog operator. A watchdog ends the run
// after 10 ms.
module tb_logical_unit;
  import alu_pkg::*;

  logic [OP_W-1:0] a, b, y;
  logic_op_e       op;
  int              checks = 0, failures = 0;

  logical_unit dut (.a(a), .b(b), .op(op), .y(y));

  function automatic logic [OP_W-1:0] model(logic [2:0] o, logic [OP_W-1:0] x, logic [OP_W-1:0] z);
    case (o)
      3'd0: return x & z;
      3'd1: return x | z;
      3'd2: return ~(x & z);
      3'd3: return ~(x | z);
      3'd4: return x ^ z;
      3'd5: return ~(x ^ z);
      3'd6: return ~x;
      default: return ~z;
    endcase
  endfunction

  task automatic check(logic [2:0] o, logic [OP_W-1:0] x, logic [OP_W-1:0] z);
    op = logic_op_e'(o); a = x; b = z;
    #1;
    checks++;
    if (y !== model(o, x, z)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h expected %h", o, x, z, y, model(o, x, z));
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
    for (int o = 0; o < 8; o++) begin
      check(3'(o), 32'h0000_ffff, 32'h00ff_00ff);
      check(3'(o), 32'hf0f0_f0f0, 32'h3333_cccc);
      for (int k = 0; k < 1000; k++) check(3'(o), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
