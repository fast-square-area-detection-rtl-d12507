// sqd_ref_pkg: reference model of the square-area detector for the
// testbenches, written from the algorithm and independent of the RTL.
//   erode      : one transition, 3x3 AND with outside nodes reading 0
//   elim_flags : Eq. (1), node 1 -> 0 and no neighbour 1 after the step
//   area_or    : OR of a map over a quadtree subarea
//   hits_zorder: flagged positions in the order a depth-first quadtree
//                search (UL, UR, LL, LR) meets them
//   search_cycles: 1 + 4 * number of non-empty subareas above node level
package sqd_ref_pkg;

  localparam int MAXD = 64;
  typedef bit map_t [MAXD][MAXD];

  function automatic int levels(int rows, int cols);
    int side = (rows > cols) ? rows : cols;
    int d = 0;
    while ((1 << d) < side) d++;
    return d;
  endfunction

  function automatic bit inside_map(int rows, int cols, int r, int c);
    return r >= 0 && c >= 0 && r < rows && c < cols;
  endfunction

  function automatic void erode(input map_t in, output map_t out, input int rows, int cols);
    for (int r = 0; r < MAXD; r++)
      for (int c = 0; c < MAXD; c++) begin
        bit v = (r < rows && c < cols);
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            v &= inside_map(rows, cols, r + dr, c + dc) && in[(r + dr) & 63][(c + dc) & 63];
        out[r][c] = v;
      end
  endfunction

  function automatic void elim_flags(input map_t prev, input map_t cur,
                                     output map_t f, input int rows, int cols);
    for (int r = 0; r < MAXD; r++)
      for (int c = 0; c < MAXD; c++) begin
        bit nb = 1'b0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (dr != 0 || dc != 0) nb |= inside_map(rows, cols, r + dr, c + dc) && cur[(r + dr) & 63][(c + dc) & 63];
        f[r][c] = (r < rows && c < cols) && prev[r][c] && !cur[r][c] && !nb;
      end
  endfunction

  function automatic bit any(input map_t m, input int rows, int cols);
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++)
        if (m[r][c]) return 1'b1;
    return 1'b0;
  endfunction

  function automatic bit area_or(input map_t m, input int rows, int cols,
                                 int d, int lvl, int r0, int c0);
    int side = 1 << (d - lvl);
    for (int r = r0; r < r0 + side; r++)
      for (int c = c0; c < c0 + side; c++)
        if (inside_map(rows, cols, r, c) && m[r & 63][c & 63]) return 1'b1;
    return 1'b0;
  endfunction

  // Hits packed as row*256 + col, in depth-first quadtree order.
  function automatic void hits_zorder(input map_t f, input int rows, int cols,
                                      ref int q[$]);
    int d = levels(rows, cols);
    q.delete();
    for (int code = 0; code < (1 << (2 * d)); code++) begin
      int r = 0, c = 0;
      for (int b = 0; b < d; b++) begin
        c |= ((code >> (2 * b)) & 1) << b;
        r |= ((code >> (2 * b + 1)) & 1) << b;
      end
      if (inside_map(rows, cols, r, c) && f[r & 63][c & 63]) q.push_back(r * 256 + c);
    end
  endfunction

  function automatic int search_cycles(input map_t f, input int rows, int cols);
    int d = levels(rows, cols);
    int n = 1;
    for (int l = 0; l < d; l++) begin
      int side = 1 << (d - l);
      for (int r0 = 0; r0 < (1 << d); r0 += side)
        for (int c0 = 0; c0 < (1 << d); c0 += side)
          if (area_or(f, rows, cols, d, l, r0, c0)) n += 4;
    end
    return n;
  endfunction

endpackage
