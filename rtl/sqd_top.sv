// sqd_top: the two square-area detection circuits side by side.
//
//  * ds_*: the detection-and-search circuit (sqd_detect_search), a
//    ROWS x COLS node array (default 64 x 57) with the eliminating-node flag
//    and the area-division search, run by its own sequencer.
//  * e1_*: the transition evaluation circuit (sqd_eval1), 5 x 6 pixels and
//    4 x 5 node automata with row and column OR readout, stepped from
//    outside.
// The two share only the clock and reset; each has its own serial image
// input. See the two modules for the interface timing.
module sqd_top #(
  parameter int unsigned ROWS  = sqd_pkg::DEF_ROWS,
  parameter int unsigned COLS  = sqd_pkg::DEF_COLS,
  parameter int unsigned PROWS = 5,
  parameter int unsigned PCOLS = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // detection-and-search circuit
  input  logic                       ds_start,
  input  logic                       ds_pix_valid,
  input  logic                       ds_pix,
  output logic                       ds_pix_ready,
  output logic                       ds_hit_valid,
  output sqd_pkg::sqd_hit_t          ds_hit,
  output logic [sqd_pkg::STEP_W-1:0] ds_step_no,
  output logic                       ds_busy,
  output logic                       ds_done,
  // transition evaluation circuit
  input  logic                       e1_pix_en,
  input  logic                       e1_pix,
  input  logic                       e1_step,
  output logic [PROWS-2:0]           e1_row_or,
  output logic [PCOLS-2:0]           e1_col_or,
  output logic                       e1_any_alive
);

  sqd_detect_search #(.ROWS(ROWS), .COLS(COLS)) u_ds (
    .clk, .rst_n,
    .start     (ds_start),
    .pix_valid (ds_pix_valid),
    .pix       (ds_pix),
    .pix_ready (ds_pix_ready),
    .hit_valid (ds_hit_valid),
    .hit       (ds_hit),
    .step_no   (ds_step_no),
    .busy      (ds_busy),
    .done      (ds_done)
  );

  sqd_eval1 #(.PROWS(PROWS), .PCOLS(PCOLS)) u_e1 (
    .clk, .rst_n,
    .pix_en    (e1_pix_en),
    .pix       (e1_pix),
    .step      (e1_step),
    .row_or    (e1_row_or),
    .col_or    (e1_col_or),
    .any_alive (e1_any_alive)
  );

endmodule
