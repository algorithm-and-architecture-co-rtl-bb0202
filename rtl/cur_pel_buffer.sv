// cur_pel_buffer: 16x16 current-macroblock buffer of the IME engine.
//
// Holds the luma pels of the MB being encoded for the whole motion search,
// so the current MB is read from the system only once. It is written one
// 16-pel row per cycle (wr_row selects the row) and all 256 pels are
// visible at once on pels[row][col] from the cycle after the write. The
// document only names this buffer; the row-wide write port is this
// design's choice, matching the 16-pel rows of the search-window SRAM.
module cur_pel_buffer
  import me_pkg::*;
#(
  parameter int N = MB
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_row,
  input  pel_t                 wr_data [N],
  output pel_t                 pels    [N][N]
);

  pel_t q [N][N];

  always_ff @(posedge clk)
    if (wr_en)
      for (int c = 0; c < N; c++) q[wr_row][c] <= wr_data[c];

  assign pels = q;

endmodule
