// tb_fss_ctrl: self-checking testbench of the four step search controller.
// The testbench plays the IME datapath: it keeps a 16x16 array of pel
// coordinates, applies every shift the controller issues with the line
// that was named (so a wrong read address or direction shows up), and at
// each evaluation checks that the array holds exactly the candidate asked
// for; it then returns a synthetic 16x16 cost two cycles later. Final
// vectors and costs are compared with the reference model of the search,
// for random cost bowls, starts near the search-range edges and single-
// candidate mode; reloads, pattern moves and refinements are counted.
module tb_fss_ctrl;
  import me_pkg::*;
  import fss_model_pkg::*;
  logic clk = 0, rst_n, start, single, flush;
  mv_t  start_mv;
  logic op_valid, op_eval, op_col;
  shift_dir_e op_dir;
  logic signed [8:0] op_lx, op_ly;
  mv_t  op_mv;
  logic sad_valid;
  sad_t sad16;
  logic busy, done, ev_reload, ev_move, ev_refine;
  mv_t  best_mv;
  sad_t best_sad;
  int checks = 0, failures = 0;
  int n_reload = 0, n_move = 0, n_refine = 0, n_hshift = 0, n_vshift = 0, n_evals = 0;
  int nn = 16;  // loop bound kept in a variable: keeps the model loops rolled
  int ax [16][16];
  int ay [16][16];
  logic [1:0] pend_v;
  sad_t pend_s [2];

  fss_ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // datapath model
  always @(posedge clk) begin
    sad_valid <= pend_v[0];
    sad16     <= pend_s[0];
    pend_v    <= {1'b0, pend_v[1]};
    pend_s[0] <= pend_s[1];
    if (ev_reload) n_reload++;
    if (ev_move) n_move++;
    if (ev_refine) n_refine++;
    if (op_valid && !op_eval) begin
      int tx_ [16][16];
      int ty_ [16][16];
      tx_ = ax; ty_ = ay;
      if (op_dir == SH_LEFT || op_dir == SH_RIGHT) n_hshift++; else n_vshift++;
      for (int r = 0; r < nn; r++)
        for (int c = 0; c < nn; c++)
          case (op_dir)
            SH_DOWN:  begin ax[r][c] = (r == 15) ? int'(op_lx) + c : tx_[r+1][c]; ay[r][c] = (r == 15) ? int'(op_ly) : ty_[r+1][c]; end
            SH_UP:    begin ax[r][c] = (r == 0)  ? int'(op_lx) + c : tx_[r-1][c]; ay[r][c] = (r == 0)  ? int'(op_ly) : ty_[r-1][c]; end
            SH_RIGHT: begin ax[r][c] = (c == 15) ? int'(op_lx) : tx_[r][c+1]; ay[r][c] = (c == 15) ? int'(op_ly) + r : ty_[r][c+1]; end
            SH_LEFT:  begin ax[r][c] = (c == 0)  ? int'(op_lx) : tx_[r][c-1]; ay[r][c] = (c == 0)  ? int'(op_ly) + r : ty_[r][c-1]; end
            default: ;
          endcase
      if (op_col != (op_dir == SH_LEFT || op_dir == SH_RIGHT)) begin
        failures++; $display("row/column read mismatch");
      end
    end
    if (op_valid && op_eval) begin
      bit ok; ok = 1;
      n_evals++;
      for (int r = 0; r < nn; r++)
        for (int c = 0; c < nn; c++)
          if (ax[r][c] != int'(op_mv.x) + c || ay[r][c] != int'(op_mv.y) + r) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("array does not hold candidate (%0d,%0d)", op_mv.x, op_mv.y);
      end
      pend_v[1] <= 1'b1;
      pend_s[1] <= 16'(cost(int'(op_mv.x), int'(op_mv.y)));
    end
  end

  task automatic run_one(int sx, int sy, bit sgl, bit fl);
    int cyc;
    @(negedge clk);
    start = 1; single = sgl; flush = fl; start_mv.x = 8'(sx); start_mv.y = 8'(sy);
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    run(sx, sy, sgl, 1'b1);
    checks += 2;
    if (int'(best_mv.x) != best_x || int'(best_mv.y) != best_y) begin
      failures++;
      $display("start (%0d,%0d) single=%0d: mv (%0d,%0d) exp (%0d,%0d)", sx, sy, sgl,
               best_mv.x, best_mv.y, best_x, best_y);
    end
    if (int'(best_sad) != best_sad_m()) begin
      failures++;
      $display("start (%0d,%0d): sad %0d exp %0d", sx, sy, best_sad, best_sad_m());
    end
  endtask

  function automatic int best_sad_m();
    return fss_model_pkg::best_sad;
  endfunction

  initial begin
    rst_n = 1; start = 0; single = 0; flush = 0; start_mv = '0;
    pend_v = '0; pend_s[0] = '0; pend_s[1] = '0;
    foreach (ax[r, c]) begin ax[r][c] = -999; ay[r][c] = -999; end
    kind = 0;
    // drop reset with a real falling edge so asynchronous resets always fire
    #2 rst_n = 0;
    #20 rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      tx = int'($urandom % 64) - 32; ty = int'($urandom % 32) - 16;
      wx = 1 + $urandom % 20; wy = 1 + $urandom % 20; hseed = $urandom;
      run_one(int'($urandom % 70) - 35, int'($urandom % 36) - 18, 1'b0, n == 0 || ($urandom % 4) == 0);
      if (n % 5 == 0) run_one(int'($urandom % 64) - 32, int'($urandom % 32) - 16, 1'b1, 1'b0);
    end
    // corners
    tx = -32; ty = 15; wx = 3; wy = 3; hseed = 1;
    run_one(31, -16, 1'b0, 1'b0);
    tx = 31; ty = -16;
    run_one(-32, 15, 1'b0, 1'b0);
    checks++;
    if (n_reload == 0 || n_move == 0 || n_refine == 0 || n_hshift == 0 || n_vshift == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("reloads=%0d moves=%0d refinements=%0d hshifts=%0d vshifts=%0d evals=%0d",
             n_reload, n_move, n_refine, n_hshift, n_vshift, n_evals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
