// tb_final_mux: checks that sel = 0 passes the arithmetic result and
// sel = 1 the zero-extended logic result, with random data on both inputs.
// A watchdog ends the run after 1 ms.
module tb_final_mux;
  import alu_pkg::*;

  logic [RES_W-1:0] arith_y, y;
  logic [OP_W-1:0]  logic_y;
  logic             sel;
  int               checks = 0, failures = 0;

  final_mux dut (.arith_y(arith_y), .logic_y(logic_y), .sel(sel), .y(y));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      arith_y = {1'($urandom), 32'($urandom), 32'($urandom)};
      logic_y = $urandom;
      sel     = 1'(k);
      #1;
      checks++;
      if (y !== (sel ? {33'b0, logic_y} : arith_y)) begin
        failures++;
        $display("FAIL sel=%0b y=%h", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
