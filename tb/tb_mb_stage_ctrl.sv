// tb_mb_stage_ctrl: self-checking testbench of the three stage controls.
// Every PE is modelled by the testbench: it logs each task it is given
// (task, MB) and answers after a random delay with results that encode the
// MB and task. Checked: the task sequence of every MB against the stage
// lists for its mode and pre-skip outcome; the MB order and the pipelined-
// register contents of every finished MB; that each PE's clock enable is
// high exactly while it has a task; that MBs overlap in the pipeline, that
// the FME engine serves stage 1 (fractional MVP) and stage 2, and that two
// stages contend for it at least once.
module tb_mb_stage_ctrl;
  import me_pkg::*;
  logic clk = 0, rst_n, low_power;
  logic mb_valid, mb_ready;
  logic [4:0] mb_x, mb_y;
  qmv_t mb_mvp;
  logic pe_start [NPE];
  task_e pe_task [NPE];
  mb_desc_t pe_desc [NPE];
  logic pe_en [NPE];
  logic pe_done [NPE];
  sad_t ime_sad, fme_cost;
  mv_t ime_mv;
  sad_t ime_part_sad [NPART];
  mv_t  ime_part_mv [NPART];
  logic ime_part_rf [NPART];
  logic ime_rf, ps_skip, out_valid, ev_conflict, ev_shared;
  qmv_t fme_mv, ps_mv;
  mb_desc_t out_desc;
  int checks = 0, failures = 0;
  int n_conflict = 0, n_shared = 0, n_overlap = 0, n_fme_s1 = 0, n_fme_s2 = 0, n_skip = 0;
  int cnt [NPE];
  logic outst [NPE];
  task_e cur [NPE];
  mb_desc_t cd [NPE];
  task_e log_q [32][$];
  int out_q [$];

  mb_stage_ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit mvp_int(int x);
    return (x % 3) != 1;
  endfunction

  // PE models
  always @(posedge clk) begin
    if (ev_conflict) n_conflict++;
    if (ev_shared) n_shared++;
    begin
      int busy_n; busy_n = 0;
      for (int p = 0; p < NPE; p++) if (outst[p]) busy_n++;
      if (busy_n >= 2) n_overlap++;
    end
    for (int p = 0; p < NPE; p++) begin
      pe_done[p] <= 1'b0;
      if (pe_start[p]) begin
        outst[p] <= 1'b1;
        cur[p] <= pe_task[p];
        cd[p] <= pe_desc[p];
        cnt[p] <= (p == PE_FME) ? 4 + $urandom % 20 : 1 + $urandom % 6;
        log_q[pe_desc[p].mb_x].push_back(pe_task[p]);
        if (p == PE_FME && pe_task[p] == T_SKIP_MVP) n_fme_s1++;
        if (p == PE_FME && pe_task[p] == T_FME) n_fme_s2++;
      end else if (outst[p] && !pe_done[p]) begin
        if (cnt[p] == 1) begin
          pe_done[p] <= 1'b1;
          case (pe_e'(p))
            PE_IME: begin
              ime_sad  <= 16'(100 + cd[p].mb_x * 10 + int'(cur[p]));
              ime_mv.x <= 8'(cd[p].mb_x); ime_mv.y <= 8'(cur[p]);
              ime_rf   <= (cur[p] == T_IME_RF1);
              for (int q = 0; q < NPART; q++) begin
                ime_part_sad[q] <= 16'(1000 * cd[p].mb_x + q);
                ime_part_mv[q].x <= 8'(q); ime_part_mv[q].y <= 8'(cur[p]);
                ime_part_rf[q] <= (cur[p] == T_IME_RF1);
              end
            end
            PE_FME: begin
              fme_cost <= 16'(500 + cd[p].mb_x);
              fme_mv.x <= 10'(cd[p].mb_x); fme_mv.y <= 10'(cd[p].mb_x);
            end
            PE_PS: begin
              ps_skip <= (cd[p].mb_x % 2 == 0);
              ps_mv.x <= 10'(cd[p].mb_x + 1); ps_mv.y <= 0;
            end
            default: ;
          endcase
        end
        cnt[p] <= cnt[p] - 1;
      end else if (pe_done[p]) outst[p] <= 1'b0;
    end
  end

  // clock enables follow the outstanding tasks
  always @(negedge clk)
    for (int p = 0; p < NPE; p++) begin
      checks++;
      if (pe_en[p] !== (outst[p] | pe_start[p])) begin
        failures++;
        if (failures < 10) $display("pe %0d enable %0d while outstanding %0d at %0t", p, pe_en[p], outst[p], $time);
      end
    end

  // finished MBs
  always @(posedge clk) if (out_valid) out_q.push_back(int'(out_desc.mb_x));

  task automatic check_mb(int x, bit lp, mb_desc_t d);
    task_e exp [$];
    bit sk;
    sk = lp && (x % 2 == 0);
    exp.push_back(T_LOAD);
    if (lp) begin exp.push_back(T_IME_ZERO); exp.push_back(T_SKIP_MVP); exp.push_back(T_PS); end
    if (!sk) begin
      exp.push_back(T_IME_RF0);
      if (!lp) exp.push_back(T_IME_RF1);
      exp.push_back(T_FME);
    end
    exp.push_back(T_MD); exp.push_back(T_IP); exp.push_back(T_CMC); exp.push_back(T_REC);
    exp.push_back(T_DB); exp.push_back(T_EC);
    checks++;
    if (exp != log_q[x]) begin
      failures++;
      $display("MB %0d task sequence differs: got %0d tasks, expected %0d", x, log_q[x].size(), exp.size());
    end
    checks++;
    if (d.skip != sk) begin failures++; $display("MB %0d skip flag", x); end
    if (sk) n_skip++;
    if (lp) begin
      checks += 2;
      if (int'(d.cost_zero) != 100 + x * 10 + int'(T_IME_ZERO)) begin failures++; $display("MB %0d cost_zero", x); end
      if (int'(d.cost_mvp) != (mvp_int(x) ? 100 + x * 10 + int'(T_SKIP_MVP) : 500 + x)) begin
        failures++; $display("MB %0d cost_mvp %0d", x, d.cost_mvp);
      end
      if (sk) begin
        checks++;
        if (int'(d.skip_mv.x) != x + 1) begin failures++; $display("MB %0d skip mv", x); end
      end
    end
    if (!sk) begin
      checks += 2;
      if (int'(d.ime_mv.y) != int'(lp ? T_IME_RF0 : T_IME_RF1) || d.ime_rf != !lp) begin
        failures++; $display("MB %0d ime result", x);
      end
      for (int q = 0; q < NPART; q++) begin
        checks++;
        if (int'(d.part_sad[q]) != 1000 * x + q || int'(d.part_mv[q].x) != q
            || int'(d.part_mv[q].y) != int'(lp ? T_IME_RF0 : T_IME_RF1)) begin
          failures++; $display("MB %0d partition %0d result", x, q);
        end
      end
      if (int'(d.fme_cost) != 500 + x || int'(d.fme_mv.x) != x) begin failures++; $display("MB %0d fme result", x); end
    end
  endtask

  mb_desc_t outs [32];
  always @(posedge clk) if (out_valid) outs[out_desc.mb_x] <= out_desc;

  task automatic run_mode(bit lp, int first, int n);
    low_power = lp;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      mb_valid = 1; mb_x = 5'(first + i); mb_y = 0;
      mb_mvp.x = 10'(mvp_int(first + i) ? 4 * (first + i) : 4 * (first + i) + 1);
      mb_mvp.y = 10'(mvp_int(first + i) ? -8 : -6);
      do @(posedge clk); while (!mb_ready);
    end
    @(negedge clk) mb_valid = 0;
    // drain
    while (out_q.size() < first + n) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int i = 0; i < n; i++) check_mb(first + i, lp, outs[first + i]);
  endtask

  initial begin
    rst_n = 1; low_power = 0; mb_valid = 0; mb_x = 0; mb_y = 0; mb_mvp = '0;
    ime_sad = 0; fme_cost = 0;
    for (int q = 0; q < NPART; q++) begin ime_part_sad[q] = 0; ime_part_mv[q] = '0; ime_part_rf[q] = 0; end
    ime_mv = '0; ime_rf = 0; ps_skip = 0; fme_mv = '0; ps_mv = '0;
    for (int p = 0; p < NPE; p++) begin pe_done[p] = 0; outst[p] = 0; cnt[p] = 0; end
    // drop reset with a real falling edge so asynchronous resets always fire
    #2 rst_n = 0;
    #20 rst_n = 1;
    run_mode(0, 0, 8);
    run_mode(1, 8, 12);
    for (int i = 0; i < out_q.size(); i++) begin
      checks++;
      if (out_q[i] != i) begin failures++; $display("MB order: position %0d holds MB %0d", i, out_q[i]); end
    end
    checks++;
    if (n_conflict == 0 || n_shared == 0 || n_overlap == 0 || n_fme_s1 == 0 || n_fme_s2 == 0 || n_skip == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("conflicts=%0d fme_stage1=%0d fme_stage2=%0d overlap_cycles=%0d skipped=%0d",
             n_conflict, n_fme_s1, n_fme_s2, n_overlap, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
