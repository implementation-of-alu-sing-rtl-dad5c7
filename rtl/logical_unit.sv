// logical_unit: the eight bitwise logic operations of the ALU.
//
// op (s[4:2] of the ALU) selects AND, OR, NAND, NOR, XOR, XNOR, NOT a or
// NOT b, each applied bit by bit to the 32-bit operands. The count of eight
// operations and the select field follow the ALU's block diagram; the
// operations themselves and their codes are this design's choice.
//
// Ports: a, b (OP_W bits), op in; y (OP_W bits) out. Purely combinational.
module logical_unit
  import alu_pkg::*;
(
  input  logic [OP_W-1:0] a,
  input  logic [OP_W-1:0] b,
  input  logic_op_e       op,
  output logic [OP_W-1:0] y
);

  always_comb begin
    unique case (op)
      LOGIC_AND:  y = a & b;
      LOGIC_OR:   y = a | b;
      LOGIC_NAND: y = ~(a & b);
      LOGIC_NOR:  y = ~(a | b);
      LOGIC_XOR:  y = a ^ b;
      LOGIC_XNOR: y = ~(a ^ b);
      LOGIC_NOTA: y = ~a;
      LOGIC_NOTB: y = ~b;
    endcase
  end

endmodule
