// vedic_16x16: 16x16-bit unsigned Vedic-Wallace multiplier.
//
// Partial products follow the Urdhva Tiryakbhyam ("vertically and
// crosswise") rule: every bit product a[i] & b[j] is formed at once and
// belongs to column i + j of the result. The sixteen rows of these terms
// (row j holds a & b[j], placed at column j) are compressed to two rows by
// a Wallace tree of full adders, and a 32-bit Brent-Kung adder forms the
// final result. The 33-bit output c(32:0) matches the port list of the
// multiplier's schematic; c[32] is the carry-out of the final adder, which
// is 0 for every product because 16x16 products fit in 32 bits.
//
// Ports: a[15:0], b[15:0] in; c[32:0] out. Purely combinational.
module vedic_16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [32:0] c
);

  localparam int unsigned N = 16;
  localparam int unsigned W = 2 * N;

  logic [N-1:0][W-1:0] pp;
  logic [W-1:0]        row_s, row_c;

  // Vertical and crosswise bit products, aligned by column.
  always_comb begin
    for (int j = 0; j < N; j++) begin
      pp[j] = '0;
      for (int i = 0; i < N; i++) begin
        pp[j][i+j] = a[i] & b[j];
      end
    end
  end

  wallace_tree #(.ROWS(N), .W(W)) u_wallace (
    .rows_i(pp), .sum_o(row_s), .carry_o(row_c)
  );

  brent_kung_adder #(.W(W)) u_bk (
    .a(row_s), .b(row_c), .cin(1'b0), .sum(c[W-1:0]), .cout(c[W])
  );

endmodule
