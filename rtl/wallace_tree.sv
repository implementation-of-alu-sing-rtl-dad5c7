// wallace_tree: reduces ROWS partial-product rows to two rows (sum, carry).
//
// Classic Wallace reduction: at each level the rows are taken in groups of
// three and every group goes through a carry-save row of full adders
// (csa_row), giving two rows; rows left over (one or two) pass to the next
// level untouched. A level with R rows leaves 2*floor(R/3) + R mod 3 rows.
// All rows of all levels sit in one flat array, level after level; the
// row counts and offsets of the levels are worked out by constant
// functions, so one generate loop builds every level. 16 rows take six
// levels (16, 11, 8, 6, 4, 3, 2), 3 rows take one.
//
// The carry row of each group is moved one place left and its top bit is
// dropped. That loses nothing as long as the true total of all rows is
// below 2**W, which holds for a product held in W = 2n bits.
//
// Because every carry row is shifted in with a 0, the lowest one or two
// bits of carry_o are constant 0 after synthesis; they are kept so that
// both outputs have the full width.
//
// Ports: rows_i (ROWS rows of W bits, row 0 in the low slice), sum_o and
// carry_o (sum_o + carry_o = total of the rows, modulo 2**W).
// Purely combinational.
module wallace_tree #(
  parameter int unsigned ROWS = 16,
  parameter int unsigned W    = 32
) (
  input  logic [ROWS-1:0][W-1:0] rows_i,
  output logic [W-1:0]           sum_o,
  output logic [W-1:0]           carry_o
);

  // Rows left after l reduction levels.
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned n = ROWS;
    for (int unsigned k = 0; k < l; k++) begin
      if (n > 2) n = 2 * (n / 3) + n % 3;
    end
    return n;
  endfunction

  // Number of levels needed to reach two rows.
  function automatic int unsigned levels();
    int unsigned n = ROWS;
    int unsigned l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  // Index of the first row of level l in the flat array.
  function automatic int unsigned offset(int unsigned l);
    int unsigned o = 0;
    for (int unsigned k = 0; k < l; k++) o += rows_at(k);
    return o;
  endfunction

  localparam int unsigned LEVELS = levels();
  localparam int unsigned TOTAL  = offset(LEVELS) + 2;

  if (ROWS < 2) begin : g_bad
    $error("wallace_tree needs at least two rows");
  end

  logic [TOTAL-1:0][W-1:0] r;

  assign r[ROWS-1:0] = rows_i;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned IN     = offset(l);
    localparam int unsigned OUT    = offset(l + 1);
    localparam int unsigned GROUPS = rows_at(l) / 3;
    localparam int unsigned REST   = rows_at(l) % 3;

    for (genvar g = 0; g < GROUPS; g++) begin : g_csa
      logic [W-1:0] s, c;
      csa_row #(.W(W)) u_csa (
        .x(r[IN+3*g]), .y(r[IN+3*g+1]), .z(r[IN+3*g+2]),
        .s(s), .c(c)
      );
      assign r[OUT+2*g]   = s;
      // c[W-1] carries weight 2**W and is 0 when the total fits in W bits
      assign r[OUT+2*g+1] = {c[W-2:0], 1'b0};
    end

    for (genvar k = 0; k < REST; k++) begin : g_pass
      assign r[OUT+2*GROUPS+k] = r[IN+3*GROUPS+k];
    end
  end

  assign sum_o   = r[TOTAL-2];
  assign carry_o = r[TOTAL-1];

endmodule
