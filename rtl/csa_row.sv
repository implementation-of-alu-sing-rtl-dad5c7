// csa_row: a row of W full adders used as a 3:2 carry-save compressor.
//
// Three W-bit rows x, y, z are reduced to a sum row s and a carry row c with
// x + y + z = s + 2*c. Each bit position is one full_adder cell. The carry
// row is returned unshifted; the caller moves it one place left.
//
// Purely combinational.
module csa_row #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(x[i]), .b(y[i]), .cin(z[i]), .sum(s[i]), .cout(c[i]));
  end

endmodule
