// alu_pkg: widths and operation encodings shared by the ALU blocks.
//
// The operand width of 32 bits follows the 32x32 multiplier that is the
// centre of the design; the 65-bit result width follows the 65-bit product
// bus (bit 64 is the carry-out of the multiplier's final adder). The
// operation codes are this design's own: the source names three arithmetic
// and eight logic operations and the select bits that choose them
// (s[1:0], s[4:2] and s[6]) but does not list the operations or their codes.
package alu_pkg;

  localparam int unsigned OP_W  = 32;          // operand width
  localparam int unsigned RES_W = 2 * OP_W + 1; // result width (65)

  // Arithmetic unit, selected by s[1:0].
  typedef enum logic [1:0] {
    ARITH_ADD  = 2'b00,  // a + b, bit 32 = carry out
    ARITH_SUB  = 2'b01,  // a - b, bit 32 = borrow
    ARITH_MUL  = 2'b10,  // a * b through the Vedic-Wallace multiplier
    ARITH_NONE = 2'b11   // unused code, result 0
  } arith_op_e;

  // Logical unit, selected by s[4:2].
  typedef enum logic [2:0] {
    LOGIC_AND  = 3'b000,
    LOGIC_OR   = 3'b001,
    LOGIC_NAND = 3'b010,
    LOGIC_NOR  = 3'b011,
    LOGIC_XOR  = 3'b100,
    LOGIC_XNOR = 3'b101,
    LOGIC_NOTA = 3'b110,
    LOGIC_NOTB = 3'b111
  } logic_op_e;

endpackage
