// tb_ime_engine: self-checking testbench of the IME engine at full size
// (16 banks, 80x48 window per frame, search range H[-32,31] V[-16,15]).
// Reference frames are synthetic textures; the current MB is a displaced
// copy of reference frame 0 with noise. The testbench loads the window and
// the MB through the write ports, then checks: single-candidate SADs; a
// four step search in frame 0 (best vector, SAD and all 41 partition
// results against the reference model); a second search in frame 1 that
// accumulates (best over both frames and frame index); the same in the
// level-D configuration. Each search must end within 1136 cycles, the
// per-MB budget of CIF at 30 frames/s and 13.5 MHz.
module tb_ime_engine;
  import me_pkg::*;
  import fss_model_pkg::*;
  logic clk = 0, rst_n, level_d;
  logic sw_wr_en, sw_wr_rf;
  logic [7:0] sw_wr_x;
  logic [5:0] sw_wr_y;
  pel_t sw_wr_data [16];
  logic cur_wr_en;
  logic [3:0] cur_wr_row;
  pel_t cur_wr_data [16];
  logic start, single, acc, rf;
  mv_t start_mv;
  logic [7:0] mb_col0;
  logic busy, done, best_rf;
  mv_t best_mv;
  sad_t best_sad;
  sad_t part_sad [NPART];
  mv_t  part_mv [NPART];
  logic part_rf [NPART];
  logic ev_reload, ev_move, ev_refine, ev_shift_h, ev_shift_v, ev_eval;
  int checks = 0, failures = 0;
  int nn = 16;
  int MBX = 3, MBY = 1;
  int DX, DY;
  int max_cycles = 0;

  ime_engine dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pel(int f, int x, int y);
    return ((x * 37 + y * 11 + f * 101) ^ (x * y * 3) ^ ((x >> 2) * 53)) & 255;
  endfunction

  function automatic int cur_pel(int r, int c);
    return (pel(0, MBX * 16 + c + DX, MBY * 16 + r + DY) + ((r * 5 + c * 3) % 7) - 3) & 255;
  endfunction

  task automatic load_window(int f, bit lvl_d);
    int xm; xm = lvl_d ? 160 : 80;
    for (int y = 0; y < 48; y++)
      for (int g = 0; g < xm / 16; g++) begin
        @(negedge clk);
        sw_wr_en = 1; sw_wr_rf = 1'(f); sw_wr_x = 8'(g * 16); sw_wr_y = 6'(y);
        for (int i = 0; i < nn; i++) begin
          // window column g*16+i holds the absolute column congruent to it
          // inside [MBX*16-32, MBX*16-32+xm)
          int ax; ax = g * 16 + i;
          while (ax < MBX * 16 - 32) ax += xm;
          while (ax >= MBX * 16 - 32 + xm) ax -= xm;
          sw_wr_data[i] = 8'(pel(f, ax, MBY * 16 + y - 16));
        end
      end
    @(negedge clk) sw_wr_en = 0;
  endtask

  task automatic model_window(int f);
    for (int y = 0; y < 48; y++)
      for (int c = 0; c < 80; c++)
        win[y][c] = pel(f, MBX * 16 + c - 32, MBY * 16 + y - 16);
  endtask

  task automatic cmd(bit sgl, bit a, bit f, int sx, int sy);
    int cyc;
    @(negedge clk);
    start = 1; single = sgl; acc = a; rf = f; start_mv.x = 8'(sx); start_mv.y = 8'(sy);
    mb_col0 = 8'((MBX * 16) % (level_d ? 160 : 80));
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (cyc > max_cycles) max_cycles = cyc;
    checks++;
    if (cyc > 1136) begin failures++; $display("search took %0d cycles", cyc); end
  endtask

  task automatic check_search(int f);
    checks += 2;
    if (int'(best_mv.x) != best_x || int'(best_mv.y) != best_y || int'(best_sad) != fss_model_pkg::best_sad) begin
      failures++;
      $display("best (%0d,%0d) sad %0d, expected (%0d,%0d) sad %0d", best_mv.x, best_mv.y, best_sad,
               best_x, best_y, fss_model_pkg::best_sad);
    end
    for (int p = 0; p < NPART; p++) begin
      checks++;
      if (int'(part_sad[p]) != part_best[p] || int'(part_mv[p].x) != part_x[p] || int'(part_mv[p].y) != part_y[p]) begin
        failures++;
        if (failures < 20) $display("partition %0d: sad %0d mv (%0d,%0d), expected %0d (%0d,%0d)", p,
                                    part_sad[p], part_mv[p].x, part_mv[p].y, part_best[p], part_x[p], part_y[p]);
      end
    end
  endtask

  // run all the checks for one displacement
  task automatic scenario(bit lvl_d, int sx, int sy);
    int best0_sad, best0_x, best0_y, exp_rf;
    int pb [41];
    int px [41];
    int py [41];
    int prf [41];
    level_d = lvl_d;
    kind = 1;
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      cur_wr_en = 1; cur_wr_row = 4'(r);
      for (int c = 0; c < nn; c++) begin
        cur_wr_data[c] = 8'(cur_pel(r, c));
        cur_blk[r][c] = cur_wr_data[c];
      end
    end
    @(negedge clk) cur_wr_en = 0;
    load_window(0, lvl_d);
    if (!lvl_d) load_window(1, lvl_d);
    // single candidates
    model_window(0);
    for (int k = 0; k < 3; k++) begin
      int x, y;
      x = (k == 0) ? 0 : int'($urandom % 64) - 32;
      y = (k == 0) ? 0 : int'($urandom % 32) - 16;
      cmd(1, 0, 0, x, y);
      checks++;
      if (int'(best_sad) != cost(x, y)) begin
        failures++; $display("single (%0d,%0d): sad %0d exp %0d", x, y, best_sad, cost(x, y));
      end
    end
    // search frame 0
    cmd(0, 0, 0, sx, sy);
    run(sx, sy, 0, 1);
    check_search(0);
    if (lvl_d) return;
    best0_sad = fss_model_pkg::best_sad; best0_x = best_x; best0_y = best_y;
    for (int p = 0; p < 41; p++) begin pb[p] = part_best[p]; px[p] = part_x[p]; py[p] = part_y[p]; prf[p] = 0; end
    // search frame 1, accumulating
    cmd(0, 1, 1, sx, sy);
    model_window(1);
    run(sx, sy, 0, 1);
    for (int p = 0; p < 41; p++)
      if (part_best[p] < pb[p]) begin pb[p] = part_best[p]; px[p] = part_x[p]; py[p] = part_y[p]; prf[p] = 1; end
    for (int p = 0; p < 41; p++) begin
      checks++;
      if (int'(part_sad[p]) != pb[p] || int'(part_mv[p].x) != px[p] || int'(part_mv[p].y) != py[p]
          || int'(part_rf[p]) != prf[p]) begin
        failures++;
        if (failures < 20) $display("two-frame partition %0d: sad %0d rf %0d, expected %0d rf %0d", p,
                                    part_sad[p], part_rf[p], pb[p], prf[p]);
      end
    end
    checks++;
    exp_rf = (pb[40] < best0_sad) ? 1 : 0;
    if (int'(best_rf) != prf[40] || int'(best_sad) != pb[40]) begin
      failures++; $display("two-frame best: rf %0d sad %0d, expected rf %0d sad %0d", best_rf, best_sad, prf[40], pb[40]);
    end
  endtask

  int n_reload = 0, n_move = 0, n_refine = 0, n_h = 0, n_v = 0;
  always @(posedge clk) begin
    if (ev_reload) n_reload++;
    if (ev_move) n_move++;
    if (ev_refine) n_refine++;
    if (ev_shift_h) n_h++;
    if (ev_shift_v) n_v++;
  end

  initial begin
    rst_n = 1; level_d = 0; sw_wr_en = 0; sw_wr_rf = 0; sw_wr_x = 0; sw_wr_y = 0;
    cur_wr_en = 0; cur_wr_row = 0; start = 0; single = 0; acc = 0; rf = 0; start_mv = '0; mb_col0 = 0;
    foreach (sw_wr_data[i]) sw_wr_data[i] = 0;
    foreach (cur_wr_data[i]) cur_wr_data[i] = 0;
    // drop reset with a real falling edge so asynchronous resets always fire
    #2 rst_n = 0;
    #20 rst_n = 1;
    DX = 5;  DY = -3; scenario(0, 0, 0);
    DX = -9; DY = 6;  scenario(0, -4, 2);
    DX = 12; DY = 9;  scenario(1, 10, 8);
    checks++;
    if (n_reload == 0 || n_move == 0 || n_refine == 0 || n_h == 0 || n_v == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("reloads=%0d moves=%0d refinements=%0d hshifts=%0d vshifts=%0d longest command=%0d cycles",
             n_reload, n_move, n_refine, n_h, n_v, max_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
