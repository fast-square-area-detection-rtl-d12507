// sqd_area_or: OR readout of the eliminating flags inside one subarea.
//
// The search assumes that the logical OR of the flags of any selected
// subarea can be read directly. This block provides that readout for the
// square subareas of a quadtree laid over the array: the array is padded to
// 2**D x 2**D (D = levels_for(ROWS, COLS)), and a query at level L with
// corner (row, col) selects the 2**(D-L) x 2**(D-L) square starting there.
// Rows and columns are selected by comparing the top L bits of each index
// with the query, the way row and column select lines would gate a wired OR.
// Parts of a subarea outside the real array hold no nodes and read as 0.
// Purely combinational: the result is valid in the same cycle as the query.
module sqd_area_or #(
  parameter int unsigned ROWS = sqd_pkg::DEF_ROWS,
  parameter int unsigned COLS = sqd_pkg::DEF_COLS
) (
  input  logic [ROWS-1:0][COLS-1:0] flag,
  input  sqd_pkg::sqd_query_t       query,
  output logic                      area_or
);
  import sqd_pkg::*;

  localparam int unsigned D = levels_for(ROWS, COLS);

  logic [COORD_W-1:0] mask;     // ones on the index bits that the level fixes
  logic [ROWS-1:0]    row_sel;
  logic [COLS-1:0]    col_sel;

  always_comb begin
    mask = '0;
    for (int b = 0; b < D; b++)
      if (b >= D - int'(query.level)) mask[b] = 1'b1;
    for (int r = 0; r < ROWS; r++)
      row_sel[r] = ((COORD_W'(r) ^ query.row) & mask) == '0;
    for (int c = 0; c < COLS; c++)
      col_sel[c] = ((COORD_W'(c) ^ query.col) & mask) == '0;
  end

  always_comb begin
    area_or = 1'b0;
    for (int r = 0; r < ROWS; r++)
      area_or |= row_sel[r] & |(flag[r] & col_sel);
  end

endmodule
