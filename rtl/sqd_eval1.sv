// sqd_eval1: the transition evaluation circuit (detection only).
//
// A PROWS x PCOLS pixel array with a (PROWS-1) x (PCOLS-1) array of node
// automata placed among the pixels, one node at the centre of every 2x2
// group of pixels. The binary image is shifted in serially (pix_en, raster
// order, top row first; after PROWS*PCOLS shifts the first pixel sent is at
// row 0, column 0). The first step after loading sets every node to the AND
// of its four surrounding pixels (a node is a block of two pixels in each
// direction); each later step sets it to the AND of its own state and its
// eight neighbouring nodes, nodes outside the array reading as 0, so
// objects shrink by one node per side per step.
// The node states are read out only as the OR of every node row (row_or)
// and of every node column (col_or); any_alive is the OR of all nodes.
// Timing: one clock per pixel shifted in, one clock per step; outputs are
// registered states and valid the cycle after a step.
// Default size 5 x 6 pixels and 4 x 5 nodes as on the published chip; the
// node-to-node rule after the first step and the load order are this
// design's choices.
module sqd_eval1 #(
  parameter int unsigned PROWS = 5,
  parameter int unsigned PCOLS = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pix_en,
  input  logic             pix,
  input  logic             step,
  output logic [PROWS-2:0] row_or,
  output logic [PCOLS-2:0] col_or,
  output logic             any_alive
);

  localparam int unsigned NR = PROWS - 1;
  localparam int unsigned NC = PCOLS - 1;

  // Packed so that bit r*PCOLS+c is pixel (r, c): the flat vector is the
  // raster-order shift chain.
  logic [PROWS-1:0][PCOLS-1:0] pixel;
  logic [PROWS*PCOLS-1:0]      chain;
  logic [NR-1:0][NC-1:0]       node, node_next;
  logic [NR+1:0][NC+1:0]       pad;
  logic                        first;  // next step is the pixel-to-node step

  always_comb begin
    pad = '0;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++)
        pad[r+1][c+1] = node[r][c];
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++)
        if (first)
          node_next[r][c] = pixel[r][c] & pixel[r][c+1] &
                            pixel[r+1][c] & pixel[r+1][c+1];
        else
          node_next[r][c] = &{pad[r][c], pad[r][c+1], pad[r][c+2],
                              pad[r+1][c], pad[r+1][c+1], pad[r+1][c+2],
                              pad[r+2][c], pad[r+2][c+1], pad[r+2][c+2]};
  end

  assign chain = pixel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pixel <= '0;
      node  <= '0;
      first <= 1'b1;
    end else if (pix_en) begin
      // Raster-order shift chain: the new pixel enters at the last place.
      pixel <= {pix, chain[PROWS*PCOLS-1:1]};
      node  <= '0;
      first <= 1'b1;
    end else if (step) begin
      node  <= node_next;
      first <= 1'b0;
    end
  end

  always_comb begin
    row_or = '0;
    col_or = '0;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        row_or[r] |= node[r][c];
        col_or[c] |= node[r][c];
      end
  end

  assign any_alive = |node;

endmodule
