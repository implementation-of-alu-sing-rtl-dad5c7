// alu: 32-bit combinational ALU with a Vedic-Wallace multiplier.
//
// Both operands go to an arithmetic unit and a logical unit in parallel;
// a final multiplexer picks one result. The 7-bit select word s is split as
// in the ALU block diagram:
//   s[1:0]  arithmetic operation (add, subtract, multiply; 11 gives 0)
//   s[4:2]  logic operation (AND, OR, NAND, NOR, XOR, XNOR, NOT a, NOT b)
//   s[5]    not used
//   s[6]    0 = arithmetic result, 1 = logic result
// The result y is 65 bits wide so that it can carry the full 32x32 product
// bus. The bit assignment of s comes from the diagram; the operation
// codes, the unused s[5] and the polarity of s[6] are this design's choice.
//
// Ports: a[31:0], b[31:0], s[6:0] in; y[64:0] out. There is no clock: y
// follows the inputs after the combinational delay.
module alu
  import alu_pkg::*;
(
  input  logic [OP_W-1:0]  a,
  input  logic [OP_W-1:0]  b,
  input  logic [6:0]       s,
  output logic [RES_W-1:0] y
);

  logic [RES_W-1:0] arith_y;
  logic [OP_W-1:0]  logic_y;

  arithmetic_unit u_arith (
    .a(a), .b(b), .op(arith_op_e'(s[1:0])), .y(arith_y)
  );

  logical_unit u_logic (
    .a(a), .b(b), .op(logic_op_e'(s[4:2])), .y(logic_y)
  );

  final_mux u_mux (
    .arith_y(arith_y), .logic_y(logic_y), .sel(s[6]), .y(y)
  );

endmodule
