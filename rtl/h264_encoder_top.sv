// h264_encoder_top: low-power H.264 baseline encoder - motion estimation
// core with flexible MB pipelining.
//
// The top wires the three stage controls (mb_stage_ctrl) to the processing
// engines. Built here: the integer motion estimation engine (ime_engine),
// the pre-skip decision (pre_skip_check) and one module-level clock gate
// (clock_gate) per engine. The other engines of the encoder - fractional ME
// (FME), inter mode decision (MD), intra prediction (IP), chroma motion
// compensation (CMC), reconstruction (REC), deblocking (DB), entropy coding
// (EC) - and the loader that brings the current MB and search-window columns
// from external memory are outside this RTL: each has a start/done port
// pair carrying the MB's pipelined-register contents, and the gated clock
// it should run on.
//
// Modes (low_power input): high-quality mode (0) searches two reference
// frames with the SRAM in its level-C configuration and no pre-skip;
// low-power mode (1) uses one reference frame, the SRAM's level-D
// configuration and the pre-skip check against skip_threshold.
//
// Loader protocol: on ld_start the loader writes the 16 rows of the
// current MB (cur_wr_*) and the search-window rows the new MB needs
// (sw_wr_*, window column = absolute column mod 80 in high-quality mode and
// mod 160 in low-power mode, window row = absolute row - 16*mb_y + 16), then
// pulses ld_done. The IME engine's clock runs during loading.
//
// FME protocol: fme_task is T_SKIP_MVP (cost fme_mv_in, the fractional
// MVP, for the pre-skip check) or T_FME (refine around fme_mv_in, the
// integer result); the engine answers with fme_done, fme_cost and fme_mv_out.
// External engines: ext_start[i] / ext_done[i] for i = MD, IP, CMC, REC,
// DB, EC (index = pe_e value - 2); ext_desc[i] holds the MB's pipelined
// registers, including the IME results of all 41 partitions for the MD engine.
module h264_encoder_top
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
  localparam int YW = $clog2(SW_H),
  localparam int NEXT = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_en,
  input  logic          low_power,
  input  sad_t          skip_threshold,
  // macroblocks to encode
  input  logic          mb_valid,
  output logic          mb_ready,
  input  logic [4:0]    mb_x,
  input  logic [4:0]    mb_y,
  input  qmv_t          mb_mvp,
  // loader
  output logic          ld_start,
  output mb_desc_t      ld_desc,
  input  logic          ld_done,
  input  logic          sw_wr_en,
  input  logic          sw_wr_rf,
  input  logic [XW-1:0] sw_wr_x,
  input  logic [YW-1:0] sw_wr_y,
  input  pel_t          sw_wr_data [NBANK],
  input  logic          cur_wr_en,
  input  logic [3:0]    cur_wr_row,
  input  pel_t          cur_wr_data [MB],
  // fractional motion estimation engine
  output logic          fme_gclk,
  output logic          fme_start,
  output task_e         fme_task,
  output qmv_t          fme_mv_in,
  input  logic          fme_done,
  input  sad_t          fme_cost,
  input  qmv_t          fme_mv_out,
  // other engines: MD, IP, CMC, REC, DB, EC
  output logic          ext_gclk  [NEXT],
  output logic          ext_start [NEXT],
  output mb_desc_t      ext_desc  [NEXT],
  input  logic          ext_done  [NEXT],
  // finished MBs
  output logic          out_valid,
  output mb_desc_t      out_desc
);

  logic     pe_start [NPE];
  task_e    pe_task  [NPE];
  mb_desc_t pe_desc  [NPE];
  logic     pe_en    [NPE];
  logic     pe_done  [NPE];

  logic ime_done, ps_done, ps_skip;
  sad_t ime_sad;
  mv_t  ime_mv;
  logic ime_rf;
  qmv_t ps_mv;
  sad_t ime_part_sad [NPART];
  mv_t  ime_part_mv  [NPART];
  logic ime_part_rf  [NPART];
  logic ev_conflict, ev_shared;

  mb_stage_ctrl u_ctrl (
    .clk, .rst_n, .low_power,
    .mb_valid, .mb_ready, .mb_x, .mb_y, .mb_mvp,
    .pe_start, .pe_task, .pe_desc, .pe_en, .pe_done,
    .ime_sad, .ime_mv, .ime_rf, .ime_part_sad, .ime_part_mv, .ime_part_rf, .fme_cost, .fme_mv(fme_mv_out), .ps_skip, .ps_mv,
    .out_valid, .out_desc, .ev_conflict, .ev_shared
  );

  always_comb begin
    pe_done[PE_IME] = ime_done;
    pe_done[PE_FME] = fme_done;
    pe_done[PE_LD]  = ld_done;
    pe_done[PE_PS]  = ps_done;
    for (int i = 0; i < NEXT; i++) pe_done[i + 2] = ext_done[i];
  end

  // ---------------- module-level clock gates ----------------
  logic ime_gclk;

  clock_gate u_cg_ime (.clk, .en(pe_en[PE_IME] | pe_en[PE_LD]), .test_en, .gclk(ime_gclk));
  clock_gate u_cg_fme (.clk, .en(pe_en[PE_FME]), .test_en, .gclk(fme_gclk));
  for (genvar i = 0; i < NEXT; i++) begin : g_cg
    clock_gate u_cg (.clk, .en(pe_en[i + 2]), .test_en, .gclk(ext_gclk[i]));
  end

  // ---------------- IME engine ----------------
  logic          ime_single, ime_acc, ime_rf_sel;
  mv_t           ime_start_mv;
  logic [XW-1:0] mb_col0;

  always_comb begin
    task_e t;
    int    c;
    t            = pe_task[PE_IME];
    ime_single   = (t == T_IME_ZERO) || (t == T_SKIP_MVP);
    ime_acc      = (t == T_IME_RF1);
    ime_rf_sel   = (t == T_IME_RF1);
    ime_start_mv = (t == T_IME_ZERO) ? '0 : to_imv(pe_desc[PE_IME].mvp);
    c            = (int'(pe_desc[PE_IME].mb_x) * MB) % (low_power ? 2 * SW_W : SW_W);
    mb_col0      = XW'(c);
  end

  ime_engine #(
    .NBANK(NBANK), .SW_W(SW_W), .SW_H(SW_H),
    .MVX_MIN(MVX_MIN), .MVX_MAX(MVX_MAX), .MVY_MIN(MVY_MIN), .MVY_MAX(MVY_MAX)
  ) u_ime (
    .clk(ime_gclk), .rst_n, .level_d(low_power),
    .sw_wr_en, .sw_wr_rf, .sw_wr_x, .sw_wr_y, .sw_wr_data,
    .cur_wr_en, .cur_wr_row, .cur_wr_data,
    .start(pe_start[PE_IME]), .single(ime_single), .acc(ime_acc), .rf(ime_rf_sel),
    .start_mv(ime_start_mv), .mb_col0,
    .busy(), .done(ime_done), .best_mv(ime_mv), .best_rf(ime_rf), .best_sad(ime_sad),
    .part_sad(ime_part_sad), .part_mv(ime_part_mv), .part_rf(ime_part_rf),
    .ev_reload(), .ev_move(), .ev_refine(), .ev_shift_h(), .ev_shift_v(), .ev_eval()
  );

  // ---------------- pre-skip decision ----------------
  pre_skip_check u_ps (
    .clk, .rst_n, .start(pe_start[PE_PS]),
    .cost_zero(pe_desc[PE_PS].cost_zero), .cost_mvp(pe_desc[PE_PS].cost_mvp),
    .mvp(pe_desc[PE_PS].mvp), .threshold(skip_threshold),
    .done(ps_done), .skip(ps_skip), .skip_mv(ps_mv)
  );

  // ---------------- external engine ports ----------------
  assign ld_start  = pe_start[PE_LD];
  assign ld_desc   = pe_desc[PE_LD];
  assign fme_start = pe_start[PE_FME];
  assign fme_task  = pe_task[PE_FME];
  assign fme_mv_in = (pe_task[PE_FME] == T_SKIP_MVP) ? pe_desc[PE_FME].mvp
                                                     : to_qmv(pe_desc[PE_FME].ime_mv);
  always_comb
    for (int i = 0; i < NEXT; i++) begin
      ext_start[i] = pe_start[i + 2];
      ext_desc[i]  = pe_desc[i + 2];
    end

endmodule
