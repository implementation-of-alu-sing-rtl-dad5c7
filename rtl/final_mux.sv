// final_mux: picks the ALU result from the arithmetic or the logical unit.
//
// sel (s[6] of the ALU) = 0 passes the 65-bit arithmetic result, sel = 1
// the 32-bit logic result, zero-extended to 65 bits. The polarity of sel is
// this design's choice.
//
// Ports: arith_y, logic_y, sel in; y out. Purely combinational.
module final_mux
  import alu_pkg::*;
(
  input  logic [RES_W-1:0] arith_y,
  input  logic [OP_W-1:0]  logic_y,
  input  logic             sel,
  output logic [RES_W-1:0] y
);

  always_comb begin
    if (sel) y = {{(RES_W-OP_W){1'b0}}, logic_y};
    else     y = arith_y;
  end

endmodule
