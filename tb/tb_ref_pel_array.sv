// tb_ref_pel_array: self-checking testbench of the 16x16 reference array.
// Applies random shifts in all four directions (and idle cycles) with random
// new lines and compares the whole array with a model after every edge.
module tb_ref_pel_array;
  import me_pkg::*;
  logic clk = 0;
  shift_dir_e shift;
  pel_t line_in [16];
  pel_t pels [16][16];
  pel_t m [16][16];
  int checks = 0, failures = 0;

  ref_pel_array #(.N(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pel_t t [16][16];
    shift = SH_NONE;
    foreach (line_in[i]) line_in[i] = 0;
    // load 16 rows from the bottom
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      shift = SH_DOWN;
      for (int c = 0; c < 16; c++) begin line_in[c] = 8'($urandom); end
      for (int rr = 0; rr < 15; rr++) m[rr] = m[rr+1];
      for (int c = 0; c < 16; c++) m[15][c] = line_in[c];
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // check state after the previous edge
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          checks++;
          if (pels[r][c] !== m[r][c]) failures++;
        end
      shift = shift_dir_e'($urandom % 5);
      foreach (line_in[i]) line_in[i] = 8'($urandom);
      t = m;
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++)
          case (shift)
            SH_DOWN:  m[r][c] = (r == 15) ? line_in[c] : t[r+1][c];
            SH_UP:    m[r][c] = (r == 0)  ? line_in[c] : t[r-1][c];
            SH_RIGHT: m[r][c] = (c == 15) ? line_in[r] : t[r][c+1];
            SH_LEFT:  m[r][c] = (c == 0)  ? line_in[r] : t[r][c-1];
            default:  ;
          endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
