// tb_cur_pel_buffer: self-checking testbench of the current-MB buffer.
// Writes random rows in random order, with idle cycles, and compares the
// 256 outputs with a model after each write.
module tb_cur_pel_buffer;
  import me_pkg::*;
  logic clk = 0, wr_en;
  logic [3:0] wr_row;
  pel_t wr_data [16];
  pel_t pels [16][16];
  pel_t m [16][16];
  int checks = 0, failures = 0;

  cur_pel_buffer #(.N(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_row = 0;
    foreach (wr_data[i]) wr_data[i] = 0;
    for (int r = 0; r < 16; r++) begin
      @(negedge clk); wr_en = 1; wr_row = 4'(r);
      foreach (wr_data[i]) begin wr_data[i] = 8'($urandom); m[r][i] = wr_data[i]; end
    end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          checks++;
          if (pels[r][c] !== m[r][c]) failures++;
        end
      wr_en = 1'($urandom); wr_row = 4'($urandom);
      foreach (wr_data[i]) begin
        wr_data[i] = 8'($urandom);
        if (wr_en) m[wr_row][i] = wr_data[i];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
