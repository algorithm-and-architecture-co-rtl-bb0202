// tb_pre_skip_check: self-checking testbench of the pre-skip decision.
// Random and boundary costs and thresholds (cost equal to the threshold,
// equal costs); the expected decision and skip vector are worked out from
// the rule "skip when the smaller cost is below the threshold, the cheaper
// vector (MVP on a tie) is the skip vector"; the one-cycle latency is checked.
module tb_pre_skip_check;
  import me_pkg::*;
  logic clk = 0, rst_n, start, done, skip;
  sad_t cost_zero, cost_mvp, threshold;
  qmv_t mvp, skip_mv;
  int checks = 0, failures = 0, n_skip = 0;

  pre_skip_check dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; start = 0; cost_zero = 0; cost_mvp = 0; threshold = 0; mvp = '0;
    // drop reset with a real falling edge so asynchronous resets always fire
    #2 rst_n = 0;
    #20 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int mn; bit e_skip; qmv_t e_mv;
      @(negedge clk);
      start = 1;
      cost_zero = 16'($urandom % 3000); cost_mvp = 16'($urandom % 3000);
      threshold = 16'($urandom % 3000);
      if (n % 7 == 0) cost_mvp = cost_zero;
      if (n % 5 == 0) threshold = (cost_zero < cost_mvp) ? cost_zero : cost_mvp;
      mvp.x = 10'($urandom); mvp.y = 10'($urandom);
      mn = (cost_mvp <= cost_zero) ? cost_mvp : cost_zero;
      e_skip = mn < int'(threshold);
      e_mv = (cost_mvp <= cost_zero) ? mvp : '0;
      @(negedge clk);
      start = 0;
      checks++;
      if (!done || skip !== e_skip || skip_mv !== e_mv) begin
        failures++;
        if (failures < 10) $display("costs %0d/%0d thr %0d: done=%0d skip=%0d exp %0d",
                                    cost_zero, cost_mvp, threshold, done, skip, e_skip);
      end
      if (e_skip) n_skip++;
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("done longer than one cycle"); end
    end
    checks++;
    if (n_skip == 0 || n_skip == 2000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
