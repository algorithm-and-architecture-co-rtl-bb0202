// tb_cif_frame: workload testbench - one CIF frame (352x288 pels, 22x18 =
// 396 MBs) encoded in high-quality mode and again in low-power mode with
// the encoder core at its default sizes.
//
// The engines outside the RTL are modelled as in tb_h264_encoder_top, and
// every MB's pipelined registers are checked against the reference model
// (pre-skip costs and decision, four step search in each reference frame,
// all 41 partition results, FME result). The frame's cycle count is checked
// against real time at 30 frames/s: 27 MHz / 30 = 900000 cycles per frame
// in high-quality mode (2272 per MB) and 13.5 MHz / 30 = 450000 in
// low-power mode (1136 per MB). The engine latencies of the models are
// this testbench's choice, so the margin says how much time the modelled
// engines may take, not what the real ones take.
module tb_cif_frame;
  import me_pkg::*;
  import fss_model_pkg::*;

  localparam int FW = 352, FH = 288, FWM = FW / 16, FHM = FH / 16;
  localparam int THR = 300;

  logic clk = 0, rst_n, test_en, low_power;
  sad_t skip_threshold;
  logic mb_valid, mb_ready;
  logic [4:0] mb_x, mb_y;
  qmv_t mb_mvp;
  logic ld_start, ld_done;
  mb_desc_t ld_desc;
  logic sw_wr_en, sw_wr_rf;
  logic [7:0] sw_wr_x;
  logic [5:0] sw_wr_y;
  pel_t sw_wr_data [16];
  logic cur_wr_en;
  logic [3:0] cur_wr_row;
  pel_t cur_wr_data [16];
  logic fme_gclk, fme_start, fme_done;
  task_e fme_task;
  qmv_t fme_mv_in, fme_mv_out;
  sad_t fme_cost;
  logic ext_gclk [6];
  logic ext_start [6];
  mb_desc_t ext_desc [6];
  logic ext_done [6];
  logic out_valid;
  mb_desc_t out_desc;

  h264_encoder_top dut (.*);

  int checks = 0, failures = 0;
  int nn = 16;
  int n_skip = 0, n_noskip = 0, n_fme_skipchk = 0, n_ime_skipchk = 0, n_conflict = 0;
  int n_move = 0, n_refine = 0, n_reload = 0, n_h = 0, n_v = 0, n_reuse = 0, n_full = 0;
  int n_ime_gated = 0, n_ime_clk = 0, n_cycles = 0, n_lvl_d = 0, n_lvl_c = 0, n_rf1_best = 0;

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- frames ----------------
  function automatic int tex(int x, int y);
    return ((x * 29 + y * 17) ^ (x * y * 5) ^ ((x >> 1) * 71) ^ ((y >> 2) * 43)) & 255;
  endfunction
  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction
  // reference frame f, edge-padded
  function automatic int refpel(int f, int x, int y);
    int cx, cy;
    cx = clampi(x, 0, FW - 1); cy = clampi(y, 0, FH - 1);
    return f == 0 ? tex(cx, cy) : tex(cx + 3, cy + 2);
  endfunction
  // motion of each MB of the current frame
  function automatic void motion(int mx, int my, output int dx, output int dy, output bit noisy);
    int k; k = mx + my * FWM;
    noisy = (k % 4) != 3;
    if (mx == 0 || k % 5 == 2) begin dx = 0; dy = 0; noisy = 0; end
    else begin dx = (k * 7) % 19 - 9; dy = (k * 5) % 11 - 5; end
  endfunction
  function automatic int curpel(int x, int y);
    int dx, dy; bit noisy;
    motion(x / 16, y / 16, dx, dy, noisy);
    return clampi(refpel(0, x + dx, y + dy) + (noisy ? ((x * 3 + y * 7) % 9) - 4 : 0), 0, 255);
  endfunction
  function automatic qmv_t mvp_of(int mx, int my);
    int dx, dy; bit noisy; qmv_t q;
    motion(mx, my, dx, dy, noisy);
    case ((mx + 2 * my) % 3)
      0: begin q.x = 10'(4 * dx);     q.y = 10'(4 * dy);     end   // integer, exact
      1: begin q.x = 10'(4 * dx + 1); q.y = 10'(4 * dy - 2); end   // fractional
      default: begin q.x = 10'(4 * (dx - 3)); q.y = 10'(4 * (dy + 2)); end // integer, off
    endcase
    return q;
  endfunction
  function automatic int blk_sad(int f, int mx, int my, int x, int y);
    int s; s = 0;
    for (int r = 0; r < nn; r++)
      for (int c = 0; c < nn; c++) begin
        int d; d = curpel(mx * 16 + c, my * 16 + r) - refpel(f, mx * 16 + x + c, my * 16 + y + r);
        s += d < 0 ? -d : d;
      end
    return s;
  endfunction

  // ---------------- loader model ----------------
  int last_x = -9, last_y = -9, last_lp = -1;
  initial begin
    ld_done = 0; sw_wr_en = 0; sw_wr_rf = 0; sw_wr_x = 0; sw_wr_y = 0; cur_wr_en = 0; cur_wr_row = 0;
    foreach (sw_wr_data[i]) sw_wr_data[i] = 0;
    foreach (cur_wr_data[i]) cur_wr_data[i] = 0;
    forever begin
      int mx, my, xm, nf, g0, g1;
      @(posedge clk);
      if (ld_start) begin
        mx = int'(ld_desc.mb_x); my = int'(ld_desc.mb_y);
        xm = low_power ? 160 : 80;
        nf = low_power ? 1 : 2;
        if (low_power) n_lvl_d++; else n_lvl_c++;
        for (int r = 0; r < 16; r++) begin
          @(negedge clk);
          cur_wr_en = 1; cur_wr_row = 4'(r);
          for (int c = 0; c < nn; c++) cur_wr_data[c] = 8'(curpel(mx * 16 + c, my * 16 + r));
        end
        @(negedge clk) cur_wr_en = 0;
        // window columns mx*16-32 .. mx*16+47 are needed
        if (mx == last_x + 1 && my == last_y && int'(low_power) == last_lp) begin
          g0 = mx * 16 + 32; g1 = g0; n_reuse++;
        end else begin
          g0 = mx * 16 - 32; g1 = mx * 16 + 32; n_full++;
        end
        for (int f = 0; f < nf; f++)
          for (int gx = g0; gx <= g1; gx += 16)
            for (int y = 0; y < 48; y++) begin
              @(negedge clk);
              sw_wr_en = 1; sw_wr_rf = 1'(f);
              sw_wr_x = 8'(((gx % xm) + xm) % xm); sw_wr_y = 6'(y);
              for (int i = 0; i < nn; i++) sw_wr_data[i] = 8'(refpel(f, gx + i, my * 16 + y - 16));
            end
        @(negedge clk) sw_wr_en = 0;
        last_x = mx; last_y = my; last_lp = int'(low_power);
        ld_done = 1;
        @(negedge clk) ld_done = 0;
      end
    end
  end

  // ---------------- FME model (on its gated clock) ----------------
  int fme_cnt = 0;
  initial begin fme_done = 0; fme_cost = 0; fme_mv_out = '0; end
  always @(posedge fme_gclk) begin
    fme_done <= 1'b0;
    if (fme_start) begin
      fme_cnt <= (fme_task == T_SKIP_MVP) ? 8 + $urandom % 30 : 100 + $urandom % 150;
      if (fme_task == T_SKIP_MVP) n_fme_skipchk++;
    end else if (fme_cnt > 0) begin
      fme_cnt <= fme_cnt - 1;
      if (fme_cnt == 1) begin
        fme_done <= 1'b1;
        if (fme_task == T_SKIP_MVP) begin
          // cost of the fractional MVP: SAD at its integer part plus 3
          fme_cost <= 16'(blk_sad(0, int'(dut.u_ctrl.desc[0].mb_x), int'(dut.u_ctrl.desc[0].mb_y),
                                  int'(to_imv(fme_mv_in).x), int'(to_imv(fme_mv_in).y)) + 3);
          fme_mv_out <= fme_mv_in;
        end else begin
          fme_cost <= 16'(int'(fme_mv_in.x) * int'(fme_mv_in.x) + 9);
          fme_mv_out.x <= fme_mv_in.x + 10'sd1;
          fme_mv_out.y <= fme_mv_in.y - 10'sd1;
        end
      end
    end
  end

  // ---------------- other engines (each on its gated clock) ----------------
  for (genvar i = 0; i < 6; i++) begin : g_ext
    int cnt = 0;
    logic done_r = 1'b0;
    assign ext_done[i] = done_r;
    always @(posedge ext_gclk[i]) begin
      done_r <= 1'b0;
      if (ext_start[i]) cnt <= 1 + $urandom % 40;
      else if (cnt > 0) begin
        cnt <= cnt - 1;
        if (cnt == 1) done_r <= 1'b1;
      end
    end
  end

  // ---------------- observation ----------------
  always @(posedge clk) begin
    n_cycles++;
    if (dut.u_ime.ev_move) n_move++;
    if (dut.u_ime.ev_refine) n_refine++;
    if (dut.u_ime.ev_reload) n_reload++;
    if (dut.u_ime.ev_shift_h) n_h++;
    if (dut.u_ime.ev_shift_v) n_v++;
    if (dut.u_ctrl.ev_conflict) n_conflict++;
    if (dut.pe_start[PE_IME] && dut.pe_task[PE_IME] == T_SKIP_MVP) n_ime_skipchk++;
  end
  always @(posedge clk) begin
    #1;
    if (dut.ime_gclk) n_ime_clk++; else n_ime_gated++;
  end

  // ---------------- expected results ----------------
  function automatic void set_model(int f, int mx, int my);
    kind = 1;
    for (int r = 0; r < nn; r++)
      for (int c = 0; c < nn; c++) cur_blk[r][c] = curpel(mx * 16 + c, my * 16 + r);
    for (int y = 0; y < 48; y++)
      for (int c = 0; c < 80; c++) win[y][c] = refpel(f, mx * 16 + c - 32, my * 16 + y - 16);
  endfunction

  task automatic check_mb(mb_desc_t d, bit lp);
    int mx, my, c0, cm, pb[41], px[41], py[41], prf[41];
    bit sk;
    qmv_t mvp, smv;
    mv_t im;
    mx = int'(d.mb_x); my = int'(d.mb_y);
    mvp = mvp_of(mx, my);
    sk = 0;
    if (lp) begin
      c0 = blk_sad(0, mx, my, 0, 0);
      if (mvp.x[1:0] == 0 && mvp.y[1:0] == 0) begin
        set_model(0, mx, my);
        run(int'(to_imv(mvp).x), int'(to_imv(mvp).y), 1, 1);
        cm = fss_model_pkg::best_sad;
      end else cm = blk_sad(0, mx, my, int'(to_imv(mvp).x), int'(to_imv(mvp).y)) + 3;
      sk = ((cm <= c0) ? cm : c0) < THR;
      smv = (cm <= c0) ? mvp : '0;
      checks += 3;
      if (int'(d.cost_zero) != c0) begin failures++; $display("MB (%0d,%0d) cost_zero %0d exp %0d", mx, my, d.cost_zero, c0); end
      if (int'(d.cost_mvp) != cm)  begin failures++; $display("MB (%0d,%0d) cost_mvp %0d exp %0d", mx, my, d.cost_mvp, cm); end
      if (d.skip != sk || (sk && d.skip_mv != smv)) begin failures++; $display("MB (%0d,%0d) skip %0d exp %0d", mx, my, d.skip, sk); end
    end
    if (sk) begin n_skip++; return; end
    if (lp) n_noskip++;
    set_model(0, mx, my);
    run(int'(to_imv(mvp).x), int'(to_imv(mvp).y), 0, 1);
    for (int p = 0; p < 41; p++) begin pb[p] = part_best[p]; px[p] = part_x[p]; py[p] = part_y[p]; prf[p] = 0; end
    if (!lp) begin
      set_model(1, mx, my);
      run(int'(to_imv(mvp).x), int'(to_imv(mvp).y), 0, 1);
      for (int p = 0; p < 41; p++)
        if (part_best[p] < pb[p]) begin pb[p] = part_best[p]; px[p] = part_x[p]; py[p] = part_y[p]; prf[p] = 1; end
    end
    if (prf[40] == 1) n_rf1_best++;
    checks++;
    if (int'(d.ime_sad) != pb[40] || int'(d.ime_mv.x) != px[40] || int'(d.ime_mv.y) != py[40] || int'(d.ime_rf) != prf[40]) begin
      failures++;
      $display("MB (%0d,%0d) lp=%0d IME (%0d,%0d) rf%0d sad %0d, expected (%0d,%0d) rf%0d sad %0d", mx, my, lp,
               d.ime_mv.x, d.ime_mv.y, d.ime_rf, d.ime_sad, px[40], py[40], prf[40], pb[40]);
    end
    for (int p = 0; p < 41; p++) begin
      checks++;
      if (int'(d.part_sad[p]) != pb[p] || int'(d.part_mv[p].x) != px[p] || int'(d.part_mv[p].y) != py[p]
          || int'(d.part_rf[p]) != prf[p]) begin
        failures++;
        if (failures < 20) $display("MB (%0d,%0d) partition %0d differs", mx, my, p);
      end
    end
    im.x = 8'(px[40]); im.y = 8'(py[40]);
    checks++;
    if (d.fme_mv.x != to_qmv(im).x + 10'sd1 || d.fme_mv.y != to_qmv(im).y - 10'sd1
        || int'(d.fme_cost) != int'(to_qmv(im).x) * int'(to_qmv(im).x) + 9) begin
      failures++; $display("MB (%0d,%0d) FME result", mx, my);
    end
  endtask

  // finished MBs are checked in order
  int n_out = 0;
  bit cur_lp;
  always @(posedge clk) if (rst_n === 1'b1 && out_valid) begin
    checks++;
    if (int'(out_desc.mb_x) != n_out % FWM || int'(out_desc.mb_y) != (n_out / FWM) % FHM) begin
      failures++; $display("MB order: got (%0d,%0d) as MB %0d", out_desc.mb_x, out_desc.mb_y, n_out);
    end
    check_mb(out_desc, cur_lp);
    n_out++;
  end

  task automatic encode_frame(bit lp, output int cycles);
    int t0, n0;
    low_power = lp; cur_lp = lp;
    t0 = n_cycles; n0 = n_out;
    for (int my = 0; my < FHM; my++)
      for (int mx = 0; mx < FWM; mx++) begin
        @(negedge clk);
        mb_valid = 1; mb_x = 5'(mx); mb_y = 5'(my); mb_mvp = mvp_of(mx, my);
        do @(posedge clk); while (!mb_ready);
      end
    @(negedge clk) mb_valid = 0;
    while (n_out < n0 + FWM * FHM) @(negedge clk);
    cycles = n_cycles - t0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    int c_hq, c_lp;
    rst_n = 1; test_en = 0; low_power = 0; skip_threshold = 16'(THR);
    mb_valid = 0; mb_x = 0; mb_y = 0; mb_mvp = '0;
    // drop reset with a real falling edge so asynchronous resets always fire
    #2 rst_n = 0;
    #20 rst_n = 1;
    encode_frame(0, c_hq);
    encode_frame(1, c_lp);
    $display("high quality: %0d cycles for %0d MBs (%0d per MB)", c_hq, FWM * FHM, c_hq / (FWM * FHM));
    $display("low power:    %0d cycles for %0d MBs (%0d per MB)", c_lp, FWM * FHM, c_lp / (FWM * FHM));
    checks += 2;
    if (c_hq / (FWM * FHM) > 2272) begin failures++; $display("high-quality mode misses the real-time budget"); end
    if (c_lp / (FWM * FHM) > 1136) begin failures++; $display("low-power mode misses the real-time budget"); end
    $display("pre-skip taken=%0d not taken=%0d; skip cost by FME=%0d by IME=%0d; PE waits=%0d",
             n_skip, n_noskip, n_fme_skipchk, n_ime_skipchk, n_conflict);
    $display("search moves=%0d refinements=%0d reloads=%0d h-shifts=%0d v-shifts=%0d; best in RF1=%0d",
             n_move, n_refine, n_reload, n_h, n_v, n_rf1_best);
    $display("window loads reused=%0d full=%0d; level-C MBs=%0d level-D MBs=%0d; IME clock on %0d gated %0d",
             n_reuse, n_full, n_lvl_c, n_lvl_d, n_ime_clk, n_ime_gated);
    checks++;
    if (n_skip == 0 || n_noskip == 0 || n_fme_skipchk == 0 || n_ime_skipchk == 0 || n_conflict == 0
        || n_move == 0 || n_refine == 0 || n_reload == 0 || n_h == 0 || n_v == 0 || n_reuse == 0
        || n_full == 0 || n_lvl_c == 0 || n_lvl_d == 0 || n_ime_gated == 0 || n_rf1_best == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
