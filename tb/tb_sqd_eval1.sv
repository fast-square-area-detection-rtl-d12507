// tb_sqd_eval1: self-checking test of the transition evaluation circuit at
// its full size, 5 x 6 pixels and 4 x 5 nodes. Random images are shifted
// in, then steps are applied until every node is 0. After each step the
// row ORs, column ORs and any_alive are compared with a model: first step
// AND of the four pixels around each node, then 3x3 AND among nodes.
module tb_sqd_eval1;
  import sqd_ref_pkg::*;
  localparam int PROWS = 5, PCOLS = 6, NR = PROWS - 1, NC = PCOLS - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pix_en = 0, pix = 0, step = 0, any_alive;
  logic [NR-1:0] row_or;
  logic [NC-1:0] col_or;
  int checks = 0, failures = 0;

  sqd_eval1 dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  map_t img, cur, nxt;

  task automatic compare(input string what);
    logic [NR-1:0] er = '0;
    logic [NC-1:0] ec = '0;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++)
        if (cur[r][c]) begin
          er[r] = 1'b1;
          ec[c] = 1'b1;
        end
    check(row_or == er, {what, " row_or"});
    check(col_or == ec, {what, " col_or"});
    check(any_alive == (er != '0), {what, " any_alive"});
  endtask

  initial begin
    automatic int max_steps = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      automatic int density = (t < 2) ? 400 * t : $urandom_range(150, 400);
      automatic int n = 0;
      foreach (img[r, c]) img[r][c] = 0;
      for (int r = 0; r < PROWS; r++)
        for (int c = 0; c < PCOLS; c++) img[r][c] = ($urandom_range(0, 399) < density);
      for (int k = 0; k < PROWS * PCOLS; k++) begin
        pix_en = 1; pix = img[k / PCOLS][k % PCOLS];
        @(negedge clk);
      end
      pix_en = 0;
      foreach (cur[r, c]) cur[r][c] = 0;
      compare("after load");
      // First step: nodes from pixels.
      foreach (cur[r, c])
        if (r < NR && c < NC)
          cur[r][c] = img[r][c] & img[r][c+1] & img[r+1][c] & img[r+1][c+1];
      step = 1; @(negedge clk); step = 0;
      n = 1;
      compare("step 1");
      while (any(cur, NR, NC)) begin
        erode(cur, nxt, NR, NC);
        cur = nxt;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        step = 1; @(negedge clk); step = 0;
        n++;
        compare($sformatf("step %0d", n));
      end
      if (n > max_steps) max_steps = n;
    end
    check(max_steps >= 3, "multi-step erosion exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
