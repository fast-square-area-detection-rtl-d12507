// sqd_detect_search: the detection-and-search circuit.
//
// A serial binary image is shifted into a ROWS x COLS array of node
// automata. The sequencer then makes the automata erode the image one node
// per side per transition; after each transition, the nodes that have just
// vanished together with all their neighbours (the eliminating nodes, the
// centre of a square object) raise a flag, and the area-division search
// reads out their positions through subarea OR queries. This repeats until
// no node is 1. Every eliminating node is reported once as a hit: its row,
// column and the transition number n at which it vanished. A square of side
// s vanishes at n = ceil(s/2): an odd square gives its single centre node,
// an even square the 2x2 nodes of its centre.
//
// Interface: start pulse; pixels by ready/valid, raster order, top row
// first; hits on hit_valid/hit, one per cycle; done (level) with step_no
// the number of transitions made. Default size 64 x 57 nodes as on the
// published chip.
module sqd_detect_search #(
  parameter int unsigned ROWS = sqd_pkg::DEF_ROWS,
  parameter int unsigned COLS = sqd_pkg::DEF_COLS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       pix_valid,
  input  logic                       pix,
  output logic                       pix_ready,
  output logic                       hit_valid,
  output sqd_pkg::sqd_hit_t          hit,
  output logic [sqd_pkg::STEP_W-1:0] step_no,
  output logic                       busy,
  output logic                       done
);
  import sqd_pkg::*;

  logic                      pix_en, step, any_alive;
  logic                      srch_start, srch_done, srch_busy, area_or;
  logic [ROWS-1:0][COLS-1:0] state, flag;
  sqd_query_t                query;

  sqd_sequencer #(.ROWS(ROWS), .COLS(COLS)) u_seq (
    .clk, .rst_n, .start, .pix_valid, .pix_ready, .pix_en, .step,
    .any_alive, .srch_start, .srch_done, .step_no, .busy, .done
  );

  sqd_node_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n, .pix_en, .pix, .step, .state, .flag, .any_alive
  );

  sqd_area_or #(.ROWS(ROWS), .COLS(COLS)) u_area_or (
    .flag, .query, .area_or
  );

  sqd_search_ctrl #(.ROWS(ROWS), .COLS(COLS)) u_search (
    .clk, .rst_n, .start(srch_start), .step_no, .query, .area_or,
    .hit_valid, .hit, .busy(srch_busy), .done(srch_done)
  );

  // Hits only come from a running search, which only runs while the
  // sequencer waits for it.
  a_hit_in_search: assert property (@(posedge clk) disable iff (!rst_n)
                                    hit_valid |-> srch_busy && busy);

endmodule
