// tb_sqd_node_array: self-checking test of the node array at 7 x 9 nodes.
// Random images made of rectangles and single pixels are shifted in raster
// order (with idle cycles in between); the state map must then equal the
// image. Transitions are applied until every node is 0, and after each one
// the state map, flag map and any_alive are compared with the reference
// erosion and Eq. (1).
module tb_sqd_node_array;
  import sqd_ref_pkg::*;
  localparam int ROWS = 7, COLS = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pix_en = 0, pix = 0, step = 0, any_alive;
  logic [ROWS-1:0][COLS-1:0] state, flag;
  int checks = 0, failures = 0;

  sqd_node_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  map_t img, cur, nxt, fl;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare(input string what);
    bit ok_s = 1, ok_f = 1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        if (state[r][c] != cur[r][c]) ok_s = 0;
        if (flag[r][c] != fl[r][c]) ok_f = 0;
      end
    check(ok_s, {what, " state"});
    check(ok_f, {what, " flag"});
    check(any_alive == any(cur, ROWS, COLS), {what, " any_alive"});
  endtask

  initial begin
    automatic int nflags = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      // Build an image.
      foreach (img[r, c]) img[r][c] = 0;
      for (int k = 0; k < 3; k++) begin
        automatic int h = $urandom_range(1, 6);
        automatic int w = $urandom_range(1, 6);
        automatic int r0 = $urandom_range(0, ROWS - 1);
        automatic int c0 = $urandom_range(0, COLS - 1);
        for (int r = r0; r < r0 + h && r < ROWS; r++)
          for (int c = c0; c < c0 + w && c < COLS; c++) img[r][c] = 1;
      end
      if (t % 2 == 1) img[$urandom_range(0, ROWS - 1)][$urandom_range(0, COLS - 1)] = 1;
      // Shift it in.
      for (int k = 0; k < ROWS * COLS; k++) begin
        while ($urandom_range(0, 3) == 0) begin
          pix_en = 0; @(negedge clk);
        end
        pix_en = 1; pix = img[k / COLS][k % COLS];
        @(negedge clk);
      end
      pix_en = 0;
      cur = img;
      foreach (fl[r, c]) fl[r][c] = 0;
      @(negedge clk);
      compare("after load");
      // Transitions.
      for (int n = 1; n < 8; n++) begin
        step = 1; @(negedge clk); step = 0;
        erode(cur, nxt, ROWS, COLS);
        elim_flags(cur, nxt, fl, ROWS, COLS);
        cur = nxt;
        foreach (fl[r, c]) nflags += fl[r][c];
        compare($sformatf("step %0d", n));
        @(negedge clk);
        compare($sformatf("hold after step %0d", n));
      end
    end
    check(nflags > 0, "some eliminating flags seen");
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
