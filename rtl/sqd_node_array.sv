// sqd_node_array: the ROWS x COLS grid of node automata.
//
// Every node is an sqd_node wired to its eight neighbours; neighbours that
// fall outside the grid read as 0. For loading, the nodes form one serial
// shift chain in raster order: with pix_en high, the chain shifts by one
// and pix enters at the last node (row ROWS-1, column COLS-1). After
// ROWS*COLS shifts the first pixel sent sits at row 0, column 0, so the
// image is sent row by row, left to right, top row first.
// With step high (and pix_en low) all nodes make one transition at once.
// The state map, the eliminating-flag map and the OR of all states
// (any_alive, low once every node is 0) are outputs.
// Default size 64 columns x 57 rows is that of the published evaluation
// chip; the raster-order chain is this design's choice (the chip is only
// said to be fed serially).
module sqd_node_array #(
  parameter int unsigned ROWS = sqd_pkg::DEF_ROWS,
  parameter int unsigned COLS = sqd_pkg::DEF_COLS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       pix_en,    // shift one pixel in
  input  logic                       pix,       // serial pixel value
  input  logic                       step,      // one transition of all nodes
  output logic [ROWS-1:0][COLS-1:0]  state,     // S^n of every node
  output logic [ROWS-1:0][COLS-1:0]  flag,      // f of every node
  output logic                       any_alive  // OR of all states
);

  localparam int unsigned N = ROWS * COLS;

  // State map padded with a ring of zeros for the neighbour wiring.
  logic [ROWS+1:0][COLS+1:0] pad;
  logic [N-1:0]              chain;  // node states in raster order

  always_comb begin
    pad = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        pad[r+1][c+1] = state[r][c];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned K = r * COLS + c;
      logic [7:0] nbr;
      logic       ser_in;

      assign nbr = {pad[r+2][c+2], pad[r+2][c+1], pad[r+2][c],
                    pad[r+1][c+2],                pad[r+1][c],
                    pad[r][c+2],   pad[r][c+1],   pad[r][c]};

      if (K == N - 1) begin : g_last
        assign ser_in = pix;
      end else begin : g_mid
        assign ser_in = chain[K+1];
      end

      sqd_node u_node (
        .clk       (clk),
        .rst_n     (rst_n),
        .en        (pix_en | step),
        .mode_load (pix_en),
        .ser_in    (ser_in),
        .nbr       (nbr),
        .s         (state[r][c]),
        .f         (flag[r][c])
      );

      assign chain[K] = state[r][c];
    end
  end

  assign any_alive = |state;

endmodule
