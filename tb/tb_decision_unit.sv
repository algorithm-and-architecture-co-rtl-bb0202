// tb_decision_unit: self-checking testbench of the decision unit / SAD buffer.
// Random update streams with random clears; a model keeps the per-partition
// minimum (first candidate wins ties) with its vector and frame.
module tb_decision_unit;
  import me_pkg::*;
  logic clk = 0, rst_n, clear, upd, rf;
  sad_t sad [NPART];
  mv_t  mv;
  sad_t best_sad [NPART];
  mv_t  best_mv [NPART];
  logic best_rf [NPART];
  sad_t ms [NPART];
  mv_t  mm [NPART];
  logic mr [NPART];
  int checks = 0, failures = 0;

  decision_unit dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; upd = 0; rf = 0; mv = '0;
    foreach (sad[i]) sad[i] = 0;
    foreach (ms[i]) begin ms[i] = '1; mm[i] = '0; mr[i] = 0; end
    #12 rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NPART; p++) begin
        checks++;
        if (best_sad[p] !== ms[p] || best_mv[p] !== mm[p] || best_rf[p] !== mr[p]) begin
          failures++;
          if (failures < 10) $display("n=%0d p=%0d got %0d exp %0d", n, p, best_sad[p], ms[p]);
        end
      end
      clear = ($urandom % 50) == 0;
      upd   = 1'($urandom);
      rf    = 1'($urandom);
      mv.x  = 8'($urandom); mv.y = 8'($urandom);
      foreach (sad[i]) sad[i] = 16'($urandom % 200);
      if (clear) foreach (ms[i]) begin ms[i] = '1; mm[i] = '0; mr[i] = 0; end
      else if (upd)
        for (int p = 0; p < NPART; p++)
          if (sad[p] < ms[p]) begin ms[p] = sad[p]; mm[p] = mv; mr[p] = rf; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
