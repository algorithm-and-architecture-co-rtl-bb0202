// sw_sram: configurable search-window (SW) SRAM with ladder-shaped data
// arrangement.
//
// The search window is kept in NBANK single-port-per-bank memories, one pel
// per word. Pel (col,row) of the window lives in bank (col + row) mod NBANK:
// each row is the previous one rotated right by one pel, so NBANK
// horizontally adjacent pels AND NBANK vertically adjacent pels always sit in
// different banks. One access therefore returns either a row segment
// (rd_col=0, pels (x..x+15, y)) or a column segment (rd_col=1, pels
// (x, y..y+15)) - the 2-D random access that lets the four step search move
// its candidate in any direction while reusing the reference array.
//
// Window columns are addressed circularly (column = absolute column mod the
// window width) so that moving to the next MB only writes the new columns
// (inter-MB data reuse). Two configurations:
//   level_d=0  level-C reuse for two reference frames: each frame owns half
//              of the memory, a window of SW_W x SW_H pels.
//   level_d=1  one reference frame owns the whole memory, a circular window
//              of 2*SW_W x SW_H pels, so columns stay resident twice as long.
//
// Interface and timing: one write and one read per cycle. A write stores a
// 16-pel row segment whose first column is a multiple of NBANK. A read
// returns its 16 pels in logical order (index 0 = leftmost or topmost) one
// cycle after rd_en. Coordinates must be inside the configured window; row
// segments may wrap around the circular column range, column segments must
// satisfy y+NBANK <= SW_H.
//
// From the document: the ladder arrangement, the bank rule and the level-C /
// level-D configurability. This design's choices: 16 banks (the figure
// shows 8 for illustration), the 80x48 window per frame (search range
// H[-32,31], V[-16,15]), one pel per word and the circular column mapping.
module sw_sram
  import me_pkg::*;
#(
  parameter int NBANK = 16,
  parameter int SW_W  = 80,   // window width per reference frame (multiple of NBANK)
  parameter int SW_H  = 48,   // window height
  localparam int G     = SW_W / NBANK,          // column groups per row, level-C
  localparam int DEPTH = 2 * SW_H * G,          // words per bank
  localparam int AW    = $clog2(DEPTH),
  localparam int XW    = $clog2(2 * SW_W),
  localparam int YW    = $clog2(SW_H)
) (
  input  logic            clk,
  input  logic            level_d,
  // write port: one row segment, x a multiple of NBANK
  input  logic            wr_en,
  input  logic            wr_rf,
  input  logic [XW-1:0]   wr_x,
  input  logic [YW-1:0]   wr_y,
  input  pel_t            wr_data [NBANK],
  // read port
  input  logic            rd_en,
  input  logic            rd_col,    // 0: row segment, 1: column segment
  input  logic            rd_rf,
  input  logic [XW-1:0]   rd_x,
  input  logic [YW-1:0]   rd_y,
  output pel_t            rd_data [NBANK]
);

  localparam int BW = $clog2(NBANK);

  // Word address of pel (col,row) of frame rf in the current configuration.
  function automatic logic [AW-1:0] word_addr(logic lvl_d, logic rfsel, int col, int row);
    int a;
    if (lvl_d) a = row * (2 * G) + col / NBANK;
    else       a = (rfsel ? SW_H * G : 0) + row * G + col / NBANK;
    return AW'(a);
  endfunction

  function automatic int xmod(logic lvl_d);
    return lvl_d ? 2 * SW_W : SW_W;
  endfunction

  logic [AW-1:0] rd_addr [NBANK];
  logic [AW-1:0] wr_addr [NBANK];
  pel_t          wr_word [NBANK];
  pel_t          bank_q  [NBANK];
  logic [BW-1:0] rot_q;

  // Per-bank address generation.
  always_comb begin
    for (int j = 0; j < NBANK; j++) begin
      int k, col, row;
      // Which element of the requested segment lives in bank j.
      k = (j - int'(rd_x) - int'(rd_y)) % NBANK;
      if (k < 0) k += NBANK;
      if (rd_col) begin
        col = int'(rd_x);
        row = int'(rd_y) + k;
      end else begin
        col = int'(rd_x) + k;
        if (col >= xmod(level_d)) col -= xmod(level_d);
        row = int'(rd_y);
      end
      rd_addr[j] = word_addr(level_d, rd_rf, col, row);
      // Write: element k of the row segment goes to bank (k + y) mod NBANK.
      k = (j - int'(wr_y)) % NBANK;
      if (k < 0) k += NBANK;
      wr_word[j] = wr_data[k];
      wr_addr[j] = word_addr(level_d, wr_rf, int'(wr_x) + k, int'(wr_y));
    end
  end

  for (genvar j = 0; j < NBANK; j++) begin : g_bank
    pel_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_en) mem[wr_addr[j]] <= wr_word[j];
      if (rd_en) bank_q[j] <= mem[rd_addr[j]];
    end
  end

  always_ff @(posedge clk)
    if (rd_en) rot_q <= BW'((int'(rd_x) + int'(rd_y)) % NBANK);

  // Undo the ladder rotation: element i came from bank (x + y + i) mod NBANK.
  always_comb
    for (int i = 0; i < NBANK; i++)
      rd_data[i] = bank_q[BW'((int'(rot_q) + i) % NBANK)];

endmodule
