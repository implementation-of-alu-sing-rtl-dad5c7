// arithmetic_unit: the three arithmetic operations of the ALU.
//
// op (s[1:0] of the ALU) selects one of:
//   ARITH_ADD  y = a + b, with the carry out in y[32]
//   ARITH_SUB  y = a - b (two's complement), with the borrow in y[32]
//   ARITH_MUL  y = a * b, the 65-bit output of the 32x32 Vedic multiplier
//   ARITH_NONE y = 0 (the fourth code is unused)
// Addition and subtraction share one ripple-carry chain of full_adder
// cells: for subtraction b is inverted and the carry-in is 1, and the
// borrow is the inverted carry-out. The multiplier always runs; the op code
// only picks the result. Which three operations there are and their codes
// are this design's choice.
//
// Ports: a, b (OP_W bits), op in; y (RES_W bits) out. Purely combinational.
module arithmetic_unit
  import alu_pkg::*;
(
  input  logic [OP_W-1:0]  a,
  input  logic [OP_W-1:0]  b,
  input  arith_op_e        op,
  output logic [RES_W-1:0] y
);

  logic            sub;
  logic [OP_W-1:0] b_eff;
  logic [OP_W:0]   carry;
  logic [OP_W-1:0] sum;
  logic [64:0]     prod;

  assign sub      = (op == ARITH_SUB);
  assign b_eff    = b ^ {OP_W{sub}};
  assign carry[0] = sub;

  for (genvar i = 0; i < OP_W; i++) begin : g_rca
    full_adder u_fa (
      .a(a[i]), .b(b_eff[i]), .cin(carry[i]),
      .sum(sum[i]), .cout(carry[i+1])
    );
  end

  vedic_32x32 u_mul (.a(a), .b(b), .c(prod));

  always_comb begin
    unique case (op)
      ARITH_ADD: y = {{(RES_W-OP_W-1){1'b0}},  carry[OP_W], sum};
      ARITH_SUB: y = {{(RES_W-OP_W-1){1'b0}}, ~carry[OP_W], sum};
      ARITH_MUL: y = prod;
      default:   y = '0;
    endcase
  end

endmodule
