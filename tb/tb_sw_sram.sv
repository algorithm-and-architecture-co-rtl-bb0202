// tb_sw_sram: self-checking testbench of the ladder-shaped search-window SRAM.
// Fills the memory with random pels through the row write port in the
// level-C configuration (two frames, 80-column circular window) and the
// level-D configuration (one frame, 160 columns), keeping a plain 2-D copy,
// then reads random row and column segments (wrapping rows included) and
// compares them, and checks the one-cycle read latency.
module tb_sw_sram;
  import me_pkg::*;
  localparam int NB = 16, W = 80, H = 48;
  logic clk = 0, level_d;
  logic wr_en, wr_rf, rd_en, rd_col, rd_rf;
  logic [7:0] wr_x, rd_x;
  logic [5:0] wr_y, rd_y;
  pel_t wr_data [NB];
  pel_t rd_data [NB];
  int checks = 0, failures = 0;
  pel_t mc [2][H][W];
  pel_t md [H][2*W];

  sw_sram #(.NBANK(NB), .SW_W(W), .SW_H(H)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd_check(bit lvl_d, bit col, bit rf, int x, int y);
    @(negedge clk);
    rd_en = 1; rd_col = col; rd_rf = rf; rd_x = 8'(x); rd_y = 6'(y);
    @(negedge clk);
    rd_en = 0;
    for (int i = 0; i < NB; i++) begin
      pel_t e;
      if (lvl_d) e = col ? md[y+i][x] : md[y][(x+i) % (2*W)];
      else       e = col ? mc[rf][y+i][x] : mc[rf][y][(x+i) % W];
      checks++;
      if (rd_data[i] !== e) begin
        failures++;
        if (failures < 10) $display("mismatch lvl_d=%0d col=%0d rf=%0d x=%0d y=%0d i=%0d got %0h exp %0h",
                                    lvl_d, col, rf, x, y, i, rd_data[i], e);
      end
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; rd_col = 0; rd_rf = 0; wr_rf = 0; wr_x = 0; wr_y = 0; rd_x = 0; rd_y = 0;
    level_d = 0;
    foreach (wr_data[i]) wr_data[i] = 0;
    // level-C fill
    for (int rf = 0; rf < 2; rf++)
      for (int y = 0; y < H; y++)
        for (int g = 0; g < W / NB; g++) begin
          @(negedge clk);
          wr_en = 1; wr_rf = 1'(rf); wr_x = 8'(g * NB); wr_y = 6'(y);
          for (int i = 0; i < NB; i++) begin
            wr_data[i] = 8'($urandom);
            mc[rf][y][g * NB + i] = wr_data[i];
          end
        end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 300; n++) begin
      bit col; col = 1'($urandom);
      rd_check(0, col, 1'($urandom), $urandom % W, col ? $urandom % (H - NB + 1) : $urandom % H);
    end
    // level-D fill
    level_d = 1;
    for (int y = 0; y < H; y++)
      for (int g = 0; g < 2 * W / NB; g++) begin
        @(negedge clk);
        wr_en = 1; wr_rf = 1'($urandom); wr_x = 8'(g * NB); wr_y = 6'(y);
        for (int i = 0; i < NB; i++) begin
          wr_data[i] = 8'($urandom);
          md[y][g * NB + i] = wr_data[i];
        end
      end
    @(negedge clk) wr_en = 0;
    for (int n = 0; n < 300; n++) begin
      bit col; col = 1'($urandom);
      rd_check(1, col, 1'($urandom), $urandom % (2 * W), col ? $urandom % (H - NB + 1) : $urandom % H);
    end
    // explicit wrapping row segment and bottom column segment
    rd_check(1, 0, 0, 2 * W - 3, 7);
    rd_check(1, 1, 0, 5, H - NB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
