// tb_sqd_top: end-to-end test of both circuits in sqd_top, run at the same
// time. The detection-and-search circuit is reduced to 12 x 16 nodes so
// that many images fit in a short run; the transition evaluation circuit
// runs at its full 5 x 6 size. Both are checked against the reference
// model, and the test counts how often each mechanism happened: pixel
// handshake stalls, transitions, eliminating nodes found, subarea division,
// moving back up the quadtree, searches of an empty flag map, multi-step
// runs, and in the evaluation circuit the pixel-to-node step, node-to-node
// steps and non-zero row/column readouts. A mechanism never seen counts as
// a failure.
module tb_sqd_top;
  import sqd_pkg::*;
  import sqd_ref_pkg::*;
  localparam int ROWS = 12, COLS = 16;
  localparam int PROWS = 5, PCOLS = 6, NR = PROWS - 1, NC = PCOLS - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ds_start = 0, ds_pix_valid = 0, ds_pix = 0, ds_pix_ready;
  logic ds_hit_valid, ds_busy, ds_done;
  sqd_hit_t ds_hit;
  logic [STEP_W-1:0] ds_step_no;
  logic e1_pix_en = 0, e1_pix = 0, e1_step = 0, e1_any_alive;
  logic [NR-1:0] e1_row_or;
  logic [NC-1:0] e1_col_or;
  int checks = 0, failures = 0;

  sqd_top #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Mechanism counters.
  int n_stall, n_steps, n_hits, n_divide, n_backup, n_empty, n_multi;
  int n_e1_first, n_e1_node, n_e1_readout;

  int got_q[$];
  logic [LEVEL_W-1:0] prev_lvl;
  always @(posedge clk) begin
    if (ds_hit_valid)
      got_q.push_back(int'(ds_hit.step) * 65536 + int'(ds_hit.row) * 256 + int'(ds_hit.col));
    if (dut.u_ds.u_search.busy) begin
      if (dut.u_ds.u_search.query.level > prev_lvl) n_divide++;
      if (dut.u_ds.u_search.query.level < prev_lvl) n_backup++;
      prev_lvl <= dut.u_ds.u_search.query.level;
    end else prev_lvl <= '0;
  end

  task automatic run_ds();
    map_t img, cur, nxt, fl;
    int exp_q[$], step_q[$];
    for (int t = 0; t < 30; t++) begin
      automatic int exp_steps = 0;
      foreach (img[r, c]) img[r][c] = 0;
      if (t > 0)
        for (int k = 0; k < $urandom_range(1, 5); k++) begin
          automatic int s = $urandom_range(1, 10);
          automatic int r0 = $urandom_range(0, ROWS - 1);
          automatic int c0 = $urandom_range(0, COLS - 1);
          for (int r = r0; r < r0 + s && r < ROWS; r++)
            for (int c = c0; c < c0 + s && c < COLS; c++) img[r][c] = 1;
        end
      exp_q.delete();
      cur = img;
      do begin
        exp_steps++;
        erode(cur, nxt, ROWS, COLS);
        elim_flags(cur, nxt, fl, ROWS, COLS);
        hits_zorder(fl, ROWS, COLS, step_q);
        if (step_q.size() == 0) n_empty++;
        foreach (step_q[i]) exp_q.push_back(exp_steps * 65536 + step_q[i]);
        cur = nxt;
      end while (any(cur, ROWS, COLS));
      got_q.delete();
      @(negedge clk);
      ds_start = 1; @(negedge clk); ds_start = 0;
      for (int k = 0; k < ROWS * COLS; k++) begin
        ds_pix_valid = 0;
        while ($urandom_range(0, 5) == 0) begin
          n_stall++;
          @(negedge clk);
        end
        ds_pix_valid = 1; ds_pix = img[k / COLS][k % COLS];
        @(negedge clk);
      end
      ds_pix_valid = 0;
      while (!ds_done) @(negedge clk);
      n_steps += int'(ds_step_no);
      n_hits += got_q.size();
      if (ds_step_no > 1) n_multi++;
      check(got_q == exp_q, $sformatf("ds hit list (%0d expected, %0d got)", exp_q.size(), got_q.size()));
      check(int'(ds_step_no) == exp_steps, "ds step count");
    end
  endtask

  task automatic run_e1();
    map_t img, cur, nxt;
    for (int t = 0; t < 60; t++) begin
      foreach (img[r, c]) img[r][c] = 0;
      for (int r = 0; r < PROWS; r++)
        for (int c = 0; c < PCOLS; c++) img[r][c] = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < PROWS * PCOLS; k++) begin
        e1_pix_en = 1; e1_pix = img[k / PCOLS][k % PCOLS];
        @(negedge clk);
      end
      e1_pix_en = 0;
      foreach (cur[r, c])
        cur[r][c] = (r < NR && c < NC) && img[r][c] && img[r][c+1] && img[r+1][c] && img[r+1][c+1];
      e1_step = 1; @(negedge clk); e1_step = 0;
      n_e1_first++;
      forever begin
        logic [NR-1:0] er = '0;
        logic [NC-1:0] ec = '0;
        for (int r = 0; r < NR; r++)
          for (int c = 0; c < NC; c++)
            if (cur[r][c]) begin er[r] = 1; ec[c] = 1; end
        check(e1_row_or == er && e1_col_or == ec, "e1 readout");
        check(e1_any_alive == (er != 0), "e1 any_alive");
        if (er != 0) n_e1_readout++;
        if (er == 0) break;
        erode(cur, nxt, NR, NC);
        cur = nxt;
        e1_step = 1; @(negedge clk); e1_step = 0;
        n_e1_node++;
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    fork
      run_ds();
      run_e1();
    join
    $display("mechanisms: stalls=%0d steps=%0d hits=%0d divide=%0d backup=%0d empty_searches=%0d multi_step_runs=%0d",
             n_stall, n_steps, n_hits, n_divide, n_backup, n_empty, n_multi);
    $display("eval1: first_steps=%0d node_steps=%0d nonzero_readouts=%0d",
             n_e1_first, n_e1_node, n_e1_readout);
    check(n_stall > 0, "pixel stall seen");
    check(n_steps > 0, "transitions seen");
    check(n_hits > 0, "eliminating nodes found");
    check(n_divide > 0, "area division seen");
    check(n_backup > 0, "move back up seen");
    check(n_empty > 0, "empty search seen");
    check(n_multi > 0, "multi-step run seen");
    check(n_e1_first > 0 && n_e1_node > 0 && n_e1_readout > 0, "eval1 mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
