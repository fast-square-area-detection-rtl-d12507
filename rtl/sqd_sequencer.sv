// sqd_sequencer: runs the detection-and-search procedure.
//
//   (1) read in the digitized image,
//   (2) make one transition of all node automata,
//   (3) if any node is eliminating, find them with the area-division search,
//   (4) repeat (2) and (3) until every node is 0.
// A start pulse begins (1): pix_ready is raised and each pixel accepted
// (pix_valid & pix_ready) is shifted into the array with pix_en, until
// ROWS*COLS pixels are in. Then the sequencer alternates one step cycle with
// one search, which always runs (an empty flag map costs it one query).
// After a search, any_alive = 0 ends the procedure: done goes high and
// stays high, with step_no the number of transitions made, until the next
// start.
// Timing: ROWS*COLS accepted pixels, then per transition 1 step cycle,
// 1 cycle to start the search, the search itself and 1 cycle to see its done.
// The ready/valid pixel handshake is this design's choice.
module sqd_sequencer #(
  parameter int unsigned ROWS = sqd_pkg::DEF_ROWS,
  parameter int unsigned COLS = sqd_pkg::DEF_COLS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       pix_valid,
  output logic                       pix_ready,
  output logic                       pix_en,      // to the node array
  output logic                       step,        // to the node array
  input  logic                       any_alive,
  output logic                       srch_start,
  input  logic                       srch_done,
  output logic [sqd_pkg::STEP_W-1:0] step_no,
  output logic                       busy,
  output logic                       done
);
  import sqd_pkg::*;

  localparam int unsigned N     = ROWS * COLS;
  localparam int unsigned CNT_W = $clog2(N + 1);

  sqd_seq_state_t   st;
  logic [CNT_W-1:0] cnt;

  assign pix_ready  = (st == SEQ_LOAD);
  assign pix_en     = pix_ready & pix_valid;
  assign step       = (st == SEQ_STEP);
  assign srch_start = (st == SEQ_SEARCH);
  assign busy       = (st != SEQ_IDLE) && (st != SEQ_DONE);
  assign done       = (st == SEQ_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= SEQ_IDLE;
      cnt     <= '0;
      step_no <= '0;
    end else begin
      unique case (st)
        SEQ_IDLE, SEQ_DONE: if (start) begin
          st      <= SEQ_LOAD;
          cnt     <= '0;
          step_no <= '0;
        end
        SEQ_LOAD: if (pix_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(N - 1)) st <= SEQ_STEP;
        end
        SEQ_STEP: begin
          step_no <= step_no + 1'b1;
          st      <= SEQ_SEARCH;
        end
        SEQ_SEARCH: st <= SEQ_WAIT;
        SEQ_WAIT: if (srch_done) st <= any_alive ? SEQ_STEP : SEQ_DONE;
        default: st <= SEQ_IDLE;
      endcase
    end
  end

endmodule
