// tb_sad_4x4_trees: self-checking testbench of the processing units and
// 4x4 adder trees. Random and extreme (0 vs 255) blocks; each 4x4 SAD is
// recomputed pel by pel.
module tb_sad_4x4_trees;
  import me_pkg::*;
  pel_t cur [16][16];
  pel_t ref_ [16][16];
  sad4_t sad4 [16];
  int checks = 0, failures = 0;

  sad_4x4_trees dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          if (n == 0)      begin cur[r][c] = 8'hff; ref_[r][c] = 8'h00; end
          else if (n == 1) begin cur[r][c] = 8'h00; ref_[r][c] = 8'hff; end
          else begin cur[r][c] = 8'($urandom); ref_[r][c] = 8'($urandom); end
        end
      #1;
      for (int b = 0; b < 16; b++) begin
        int e; e = 0;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            int d; d = int'(cur[(b/4)*4+r][(b%4)*4+c]) - int'(ref_[(b/4)*4+r][(b%4)*4+c]);
            e += d < 0 ? -d : d;
          end
        checks++;
        if (int'(sad4[b]) != e) begin
          failures++;
          if (failures < 10) $display("block %0d got %0d exp %0d", b, sad4[b], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
