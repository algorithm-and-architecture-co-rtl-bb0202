// fss_model_pkg: reference model of the four step search, used by the
// testbenches to work out expected results independently of the RTL.
//
// The cost of a candidate is either a synthetic bowl-shaped function
// (kind 0: |x-tx|*wx + |y-ty|*wy + a hash term) or the real SADs between a
// 16x16 current block and a reference window held in this package
// (kind 1: win[row][col], row = mvy+16+r, col = mvx+32+c). run() follows the
// search rules: 3x3 step-2 pattern around the clamped start, centre first
// then raster order, move to a strictly smaller minimum, then 8 step-1
// neighbours; it keeps a set of visited candidates and evaluates each
// candidate once. It also tracks the best SAD of all 41 partitions.
package fss_model_pkg;

  localparam int XMIN = -32, XMAX = 31, YMIN = -16, YMAX = 15;

  int kind;
  int n4 = 4, n16 = 16, n41 = 41, n9 = 9;  // loop bounds in variables keep loops rolled
  int tx, ty, wx, wy, hseed;
  int unsigned cur_blk [16][16];
  int unsigned win [48][80];

  // results of run()
  int best_x, best_y, best_sad, n_eval, n_moves;
  int part_best [41];
  int part_x [41];
  int part_y [41];
  bit visited [64][32];

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic void parts(int x, int y, ref int p [41]);
    int s4 [16];
    for (int b = 0; b < n16; b++) begin
      s4[b] = 0;
      for (int r = 0; r < n4; r++)
        for (int c = 0; c < n4; c++) begin
          int cr, cc;
          cr = (b / 4) * 4 + r; cc = (b % 4) * 4 + c;
          s4[b] += iabs(int'(cur_blk[cr][cc]) - int'(win[y + 16 + cr][x + 32 + cc]));
        end
    end
    // partition (w,h in 4x4 units) at block origin; order as in the design
    for (int i = 0; i < n41; i++) begin
      int bw, bh, br, bc;
      if (i < 16)      begin bw = 1; bh = 1; br = i / 4;            bc = i % 4;            end
      else if (i < 24) begin bw = 2; bh = 1; br = (i - 16) / 2;     bc = ((i - 16) % 2) * 2; end
      else if (i < 32) begin bw = 1; bh = 2; br = ((i - 24) / 4) * 2; bc = (i - 24) % 4;   end
      else if (i < 36) begin bw = 2; bh = 2; br = ((i - 32) / 2) * 2; bc = ((i - 32) % 2) * 2; end
      else if (i < 38) begin bw = 4; bh = 2; br = (i - 36) * 2;     bc = 0;                end
      else if (i < 40) begin bw = 2; bh = 4; br = 0;                bc = (i - 38) * 2;     end
      else             begin bw = 4; bh = 4; br = 0;                bc = 0;                end
      p[i] = 0;
      for (int r = 0; r < bh; r++)
        for (int c = 0; c < bw; c++) p[i] += s4[(br + r) * 4 + bc + c];
    end
  endfunction

  function automatic int cost(int x, int y);
    if (kind == 0) begin
      int h;
      h = ((x * 7 + y * 13 + hseed) & 32'h7fff_ffff) % 5;
      return iabs(x - tx) * wx + iabs(y - ty) * wy + h;
    end else begin
      int p [41];
      parts(x, y, p);
      return p[40];
    end
  endfunction

  function automatic bit in_range(int x, int y);
    return x >= XMIN && x <= XMAX && y >= YMIN && y <= YMAX;
  endfunction

  function automatic void eval(int x, int y, bit track_parts);
    int s;
    if (visited[x - XMIN][y - YMIN]) return;
    visited[x - XMIN][y - YMIN] = 1'b1;
    n_eval++;
    s = cost(x, y);
    if (s < best_sad) begin best_sad = s; best_x = x; best_y = y; end
    if (track_parts && kind == 1) begin
      int p [41];
      parts(x, y, p);
      for (int i = 0; i < n41; i++)
        if (p[i] < part_best[i]) begin part_best[i] = p[i]; part_x[i] = x; part_y[i] = y; end
    end
  endfunction

  // clear_parts=0 continues the partition minima of an earlier run
  function automatic void run(int sx, int sy, bit single, bit clear_parts);
    int cx, cy;
    int ord [9] = '{4, 0, 1, 2, 3, 5, 6, 7, 8};
    foreach (visited[i, j]) visited[i][j] = 1'b0;
    if (clear_parts)
      for (int i = 0; i < n41; i++) begin part_best[i] = 32'h7fffffff; part_x[i] = 0; part_y[i] = 0; end
    cx = sx < XMIN ? XMIN : (sx > XMAX ? XMAX : sx);
    cy = sy < YMIN ? YMIN : (sy > YMAX ? YMAX : sy);
    best_sad = 32'h7fffffff; n_eval = 0; n_moves = 0;
    best_x = cx; best_y = cy;
    if (single) begin
      eval(cx, cy, 1'b0);
      return;
    end
    forever begin
      for (int k = 0; k < n9; k++) begin
        int x, y;
        x = cx + (ord[k] % 3 - 1) * 2; y = cy + (ord[k] / 3 - 1) * 2;
        if (in_range(x, y)) eval(x, y, 1'b1);
      end
      if (best_x == cx && best_y == cy) break;
      cx = best_x; cy = best_y; n_moves++;
    end
    for (int k = 0; k < n9; k++) begin
      int x, y;
      x = cx + ord[k] % 3 - 1; y = cy + ord[k] / 3 - 1;
      if (in_range(x, y)) eval(x, y, 1'b1);
    end
  endfunction

endpackage
