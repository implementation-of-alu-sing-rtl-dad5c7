// vedic_32x32: 32x32-bit unsigned multiplier from four 16x16 Vedic blocks.
//
// Each operand is split into halves, a = aH:aL and b = bH:bL, and the four
// half products are formed in parallel by vedic_16x16 blocks: the vertical
// terms aL*bL and aH*bH and the crosswise terms aH*bL and aL*bH. The
// vertical products side by side give one 64-bit row, each crosswise
// product shifted left by 16 gives another; the three rows pass one
// carry-save level (wallace_tree with three rows) and a 64-bit Brent-Kung
// adder. The 65-bit output c(64:0) matches the 65-bit product bus of the
// reference design; c[64] is the final carry-out and is 0 for
// every product. Bit 32 of each 16x16 block output is always 0 and is not
// used here.
//
// Ports: a[31:0], b[31:0] in; c[64:0] out. Purely combinational.
module vedic_32x32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [64:0] c
);

  logic [32:0]       q_ll, q_hl, q_lh, q_hh;
  logic [2:0][63:0]  rows;
  logic [63:0]       row_s, row_c;

  vedic_16x16 u_ll (.a(a[15:0]),  .b(b[15:0]),  .c(q_ll));
  vedic_16x16 u_hl (.a(a[31:16]), .b(b[15:0]),  .c(q_hl));
  vedic_16x16 u_lh (.a(a[15:0]),  .b(b[31:16]), .c(q_lh));
  vedic_16x16 u_hh (.a(a[31:16]), .b(b[31:16]), .c(q_hh));

  always_comb begin
    rows[0] = {q_hh[31:0], q_ll[31:0]};
    rows[1] = {16'b0, q_hl[31:0], 16'b0};
    rows[2] = {16'b0, q_lh[31:0], 16'b0};
  end

  wallace_tree #(.ROWS(3), .W(64)) u_wallace (
    .rows_i(rows), .sum_o(row_s), .carry_o(row_c)
  );

  brent_kung_adder #(.W(64)) u_bk (
    .a(row_s), .b(row_c), .cin(1'b0), .sum(c[63:0]), .cout(c[64])
  );

endmodule
