// tb_vbs_tree: self-checking testbench of the variable-block-size tree.
// Each of the 41 outputs is compared with the sum of the 4x4 SADs its
// partition covers, worked out from the partition's position and size.
module tb_vbs_tree;
  import me_pkg::*;
  sad4_t sad4 [16];
  sad_t  sad [NPART];
  int checks = 0, failures = 0;

  vbs_tree dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      foreach (sad4[i]) sad4[i] = (n == 0) ? 12'd4080 : 12'($urandom % 4081);
      #1;
      for (int i = 0; i < NPART; i++) begin
        int bw, bh, br, bc, e;
        if (i < 16)      begin bw = 1; bh = 1; br = i / 4;              bc = i % 4;              end
        else if (i < 24) begin bw = 2; bh = 1; br = (i - 16) / 2;       bc = ((i - 16) % 2) * 2; end
        else if (i < 32) begin bw = 1; bh = 2; br = ((i - 24) / 4) * 2; bc = (i - 24) % 4;       end
        else if (i < 36) begin bw = 2; bh = 2; br = ((i - 32) / 2) * 2; bc = ((i - 32) % 2) * 2; end
        else if (i < 38) begin bw = 4; bh = 2; br = (i - 36) * 2;       bc = 0;                  end
        else if (i < 40) begin bw = 2; bh = 4; br = 0;                  bc = (i - 38) * 2;       end
        else             begin bw = 4; bh = 4; br = 0;                  bc = 0;                  end
        e = 0;
        for (int r = 0; r < bh; r++)
          for (int c = 0; c < bw; c++) e += int'(sad4[(br + r) * 4 + bc + c]);
        checks++;
        if (int'(sad[i]) != e) begin
          failures++;
          if (failures < 10) $display("partition %0d got %0d exp %0d", i, sad[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
