// ime_engine: low-power integer motion estimation (IME) engine.
//
// Combines the document's three IME techniques:
//   * a configurable search-window SRAM with ladder-shaped arrangement
//     (sw_sram), so rows and columns of 16 reference pels can be read in
//     one cycle;
//   * the 2-D adder tree architecture: a 16x16 reference array
//     (ref_pel_array) that takes one new line per move, a current-MB buffer
//     (cur_pel_buffer), 256 processing units with 16 4x4 adder trees
//     (sad_4x4_trees), one variable-block-size tree (vbs_tree) and a
//     decision unit with SAD buffer (decision_unit), so all 41 partition
//     SADs of a candidate come out together;
//   * the parallel VBS four step search controller (fss_ctrl).
//
// Commands: start with single=1 evaluates only start_mv (used for the
// pre-skip candidates); single=0 runs a four step search from start_mv in
// reference frame rf. acc=1 keeps the SAD buffer of the previous search, so
// a second search over the other reference frame yields the best over both.
// mb_col0 is the window column of the MB's left edge (MB column*16 modulo
// the window width). done pulses for one cycle at the end; best_mv and
// best_sad then hold the single candidate's SAD, or the best 16x16 result
// of the search; part_* hold the best of every partition.
//
// Timing: an operation of the controller is seen by the SRAM in the cycle
// after it is issued; the read data shifts the array one cycle later, and
// an evaluation takes the SADs in the same cycle as a shift would, so a
// one-pel move followed by an evaluation costs two cycles plus the two-
// cycle SAD return. A reload of the array costs 16 cycles.
//
// The search window, current MB and array are loaded through the write
// ports; the array is considered stale after any window write or a change
// of reference frame or MB.
module ime_engine
  import me_pkg::*;
#(
  parameter int NBANK   = 16,
  parameter int SW_W    = 80,
  parameter int SW_H    = 48,
  parameter int MVX_MIN = -32,
  parameter int MVX_MAX = 31,
  parameter int MVY_MIN = -16,
  parameter int MVY_MAX = 15,
  localparam int XW = $clog2(2 * SW_W),
  localparam int YW = $clog2(SW_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          level_d,
  // search-window write port
  input  logic          sw_wr_en,
  input  logic          sw_wr_rf,
  input  logic [XW-1:0] sw_wr_x,
  input  logic [YW-1:0] sw_wr_y,
  input  pel_t          sw_wr_data [NBANK],
  // current-MB write port
  input  logic          cur_wr_en,
  input  logic [3:0]    cur_wr_row,
  input  pel_t          cur_wr_data [MB],
  // command
  input  logic          start,
  input  logic          single,
  input  logic          acc,
  input  logic          rf,
  input  mv_t           start_mv,
  input  logic [XW-1:0] mb_col0,
  output logic          busy,
  output logic          done,
  output mv_t           best_mv,
  output logic          best_rf,
  output sad_t          best_sad,
  output sad_t          part_sad [NPART],
  output mv_t           part_mv  [NPART],
  output logic          part_rf  [NPART],
  // observation
  output logic          ev_reload,
  output logic          ev_move,
  output logic          ev_refine,
  output logic          ev_shift_h,
  output logic          ev_shift_v,
  output logic          ev_eval
);

  // ---------------- command registers ----------------
  logic          rf_q, single_q, stale;
  logic [XW-1:0] col0_q;
  logic          flush;

  assign flush = stale || (rf != rf_q) || (mb_col0 != col0_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_q <= 1'b0; single_q <= 1'b0; stale <= 1'b1; col0_q <= '0;
    end else begin
      if (start) begin
        rf_q <= rf; single_q <= single; col0_q <= mb_col0; stale <= 1'b0;
      end
      if (sw_wr_en) stale <= 1'b1;
    end
  end

  // ---------------- four step search controller ----------------
  logic              op_valid, op_eval, op_col;
  shift_dir_e        op_dir;
  logic signed [8:0] op_lx, op_ly;
  mv_t               op_mv;
  logic              sad_valid;
  sad_t              sad16_q;
  mv_t               fss_mv;
  sad_t              fss_sad;

  fss_ctrl #(
    .MVX_MIN(MVX_MIN), .MVX_MAX(MVX_MAX), .MVY_MIN(MVY_MIN), .MVY_MAX(MVY_MAX)
  ) u_fss (
    .clk, .rst_n, .start, .single, .flush, .start_mv,
    .op_valid, .op_eval, .op_dir, .op_col, .op_lx, .op_ly, .op_mv,
    .sad_valid, .sad16(sad16_q),
    .busy, .done, .best_mv(fss_mv), .best_sad(fss_sad),
    .ev_reload, .ev_move, .ev_refine
  );

  assign ev_shift_h = op_valid && !op_eval && (op_dir == SH_LEFT || op_dir == SH_RIGHT);
  assign ev_shift_v = op_valid && !op_eval && (op_dir == SH_UP || op_dir == SH_DOWN);
  assign ev_eval    = op_valid && op_eval;

  // ---------------- search-window SRAM ----------------
  logic [XW-1:0] rd_x;
  logic [YW-1:0] rd_y;
  pel_t          rd_data [NBANK];

  always_comb begin
    int v, xm;
    xm = level_d ? 2 * SW_W : SW_W;
    v  = int'(col0_q) + int'(op_lx);
    if (v < 0)   v += xm;
    if (v >= xm) v -= xm;
    rd_x = XW'(v);
    rd_y = YW'(int'(op_ly) - MVY_MIN);
  end

  sw_sram #(.NBANK(NBANK), .SW_W(SW_W), .SW_H(SW_H)) u_sram (
    .clk, .level_d,
    .wr_en(sw_wr_en), .wr_rf(sw_wr_rf), .wr_x(sw_wr_x), .wr_y(sw_wr_y), .wr_data(sw_wr_data),
    .rd_en(op_valid && !op_eval), .rd_col(op_col), .rd_rf(rf_q), .rd_x, .rd_y, .rd_data
  );

  // ---------------- operation delayed by the SRAM latency ----------------
  logic       opd_valid, opd_eval;
  shift_dir_e opd_dir;
  mv_t        opd_mv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opd_valid <= 1'b0; opd_eval <= 1'b0; opd_dir <= SH_NONE; opd_mv <= '0;
    end else begin
      opd_valid <= op_valid; opd_eval <= op_eval; opd_dir <= op_dir; opd_mv <= op_mv;
    end
  end

  // ---------------- 2-D adder tree datapath ----------------
  pel_t  ref_pels [MB][MB];
  pel_t  cur_pels [MB][MB];
  pel_t  line_in  [MB];
  sad4_t sad4     [16];
  sad_t  sad_all  [NPART];
  shift_dir_e arr_shift;

  always_comb
    for (int i = 0; i < MB; i++) line_in[i] = rd_data[i];

  assign arr_shift = (opd_valid && !opd_eval) ? opd_dir : SH_NONE;

  ref_pel_array #(.N(MB)) u_ref (.clk, .shift(arr_shift), .line_in, .pels(ref_pels));

  cur_pel_buffer #(.N(MB)) u_cur (
    .clk, .wr_en(cur_wr_en), .wr_row(cur_wr_row), .wr_data(cur_wr_data), .pels(cur_pels)
  );

  sad_4x4_trees u_pu (.cur(cur_pels), .ref_(ref_pels), .sad4);

  vbs_tree u_vbs (.sad4, .sad(sad_all));

  decision_unit u_dec (
    .clk, .rst_n,
    .clear(start && !single && !acc),
    .upd(opd_valid && opd_eval && !single_q),
    .sad(sad_all), .mv(opd_mv), .rf(rf_q),
    .best_sad(part_sad), .best_mv(part_mv), .best_rf(part_rf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad_valid <= 1'b0; sad16_q <= '0;
    end else begin
      sad_valid <= opd_valid && opd_eval;
      sad16_q   <= sad_all[NPART-1];
    end
  end

  assign best_mv  = single_q ? fss_mv  : part_mv[NPART-1];
  assign best_sad = single_q ? fss_sad : part_sad[NPART-1];
  assign best_rf  = single_q ? rf_q    : part_rf[NPART-1];

  // A command is only accepted while the engine is idle.
  always_ff @(posedge clk)
    if (start) assert (!busy) else $error("IME started while busy");

endmodule
