// tb_sqd_sequencer: self-checking test of the procedure sequencer with a
// 3 x 4 array. The testbench stands in for the node array and the search:
// it offers pixels with random gaps, answers each search start with done
// after a random delay, and keeps any_alive high for the first K steps.
// Checked: exactly ROWS*COLS pixels accepted, then alternating single-cycle
// step and search-start pulses in the cycle order the design specifies,
// step_no counting the transitions, and done after step K.
module tb_sqd_sequencer;
  import sqd_pkg::*;
  localparam int ROWS = 3, COLS = 4, N = ROWS * COLS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 0, pix_valid = 0, pix_ready, pix_en, step;
  logic any_alive = 0, srch_start, srch_done = 0, busy, done;
  logic [STEP_W-1:0] step_no;
  int checks = 0, failures = 0;

  sqd_sequencer #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && !pix_ready, "idle after reset");
    for (int t = 0; t < 40; t++) begin
      automatic int k_steps = $urandom_range(1, 6);
      automatic int accepted = 0;
      automatic int steps = 0;
      start = 1; @(negedge clk); start = 0;
      // Load phase.
      while (accepted < N) begin
        pix_valid = ($urandom_range(0, 2) != 0);
        #1;
        check(pix_ready && !step && !srch_start, "load phase outputs");
        check(pix_en == pix_valid, "pix_en follows pix_valid");
        if (pix_en) accepted++;
        @(negedge clk);
      end
      pix_valid = 1;  // further pixels must be refused
      // Transition / search loop.
      forever begin
        #1;
        check(step && !pix_ready && !pix_en, "step pulse after load or search");
        steps++;
        any_alive = (steps < k_steps);
        @(negedge clk);
        check(!step && srch_start, "search start right after step");
        check(step_no == STEP_W'(steps), "step_no counts steps");
        @(negedge clk);
        check(!srch_start && busy, "waiting for search");
        repeat ($urandom_range(0, 5)) begin
          @(negedge clk);
          check(!step && !srch_start && busy, "held while search runs");
        end
        srch_done = 1; @(negedge clk); srch_done = 0;
        if (!any_alive) break;
      end
      #1;
      check(done && !busy, "done when no node alive");
      check(int'(step_no) == k_steps, "number of steps");
      pix_valid = 0;
      repeat (2) @(negedge clk);
      check(done, "done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
