// tb_alu: end-to-end test of the ALU at its default configuration.
//
// Random and corner operands are applied with every value of the select
// word s[6:0] that matters: the four arithmetic codes in s[1:0] with
// s[6] = 0, the eight logic codes in s[4:2] with s[6] = 1, and both values
// of the unused bit s[5]. Every result is compared with a reference model
// written with SystemVerilog operators. The test also counts how often each
// mechanism happened: each of the eleven operations, a carry out of the
// addition, a borrow out of the subtraction, a product above 32 bits, the
// unused arithmetic code, and each setting of the final multiplexer. A
// mechanism that never happened counts as a failure. It includes the
// 20 x 10 = 200 multiplication example. A watchdog ends the run after 10 ms.
module tb_alu;
  import alu_pkg::*;

  logic [OP_W-1:0]  a, b;
  logic [6:0]       s;
  logic [RES_W-1:0] y;
  int               checks = 0, failures = 0;

  int n_arith[4];
  int n_logic[8];
  int n_carry, n_borrow, n_wide_product, n_sel_arith, n_sel_logic;

  alu dut (.a(a), .b(b), .s(s), .y(y));

  function automatic logic [RES_W-1:0] model(logic [6:0] sel, logic [OP_W-1:0] x, logic [OP_W-1:0] z);
    logic [OP_W-1:0] l;
    if (sel[6]) begin
      case (sel[4:2])
        3'd0: l = x & z;
        3'd1: l = x | z;
        3'd2: l = ~(x & z);
        3'd3: l = ~(x | z);
        3'd4: l = x ^ z;
        3'd5: l = ~(x ^ z);
        3'd6: l = ~x;
        default: l = ~z;
      endcase
      return RES_W'(l);
    end
    case (sel[1:0])
      2'd0: return RES_W'(33'(x) + 33'(z));
      2'd1: return RES_W'({x < z, x - z});
      2'd2: return RES_W'(64'(x) * 64'(z));
      default: return '0;
    endcase
  endfunction

  task automatic apply(logic [6:0] sel, logic [OP_W-1:0] x, logic [OP_W-1:0] z);
    logic [RES_W-1:0] exp_y;
    s = sel; a = x; b = z;
    #1;
    exp_y = model(sel, x, z);
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL s=%b a=%h b=%h y=%h expected %h", sel, x, z, y, exp_y);
    end
    if (sel[6]) begin
      n_sel_logic++;
      n_logic[sel[4:2]]++;
    end else begin
      n_sel_arith++;
      n_arith[sel[1:0]]++;
      if (sel[1:0] == 2'd0 && y[32]) n_carry++;
      if (sel[1:0] == 2'd1 && y[32]) n_borrow++;
      if (sel[1:0] == 2'd2 && y[63:32] !== 0) n_wide_product++;
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
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
    // 20 x 10 = 200
    apply(7'b000_0010, 32'd20, 32'd10);
    checks++;
    if (y !== 65'd200) begin
      failures++;
      $display("FAIL 20 x 10 gave %0d", y);
    end
    for (int k = 0; k < 4000; k++) begin
      logic [6:0]      sel;
      logic [OP_W-1:0] x, z;
      sel = 7'($urandom);
      case (k % 4)
        0: begin x = $urandom; z = $urandom; end
        1: begin x = '1; z = 32'($urandom_range(0, 3)); end
        2: begin x = 32'($urandom_range(0, 255)); z = 32'($urandom_range(0, 255)); end
        default: begin x = $urandom; z = x; end
      endcase
      apply(sel, x, z);
    end
    // Every select code at least once, on fixed operands.
    for (int v = 0; v < 128; v++) apply(7'(v), 32'hdead_beef, 32'h1234_5678);

    $display("mechanisms exercised:");
    need("add", n_arith[0]);
    need("subtract", n_arith[1]);
    need("multiply", n_arith[2]);
    need("unused arithmetic code", n_arith[3]);
    for (int o = 0; o < 8; o++) need($sformatf("logic op %0d", o), n_logic[o]);
    need("add carry out", n_carry);
    need("subtract borrow", n_borrow);
    need("product above 32 bits", n_wide_product);
    need("mux selects arithmetic", n_sel_arith);
    need("mux selects logic", n_sel_logic);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
