// me_pkg: types and constants shared by the low-power H.264 encoder RTL.
//
// Pels are 8-bit luma samples and a macroblock (MB) is 16x16 pels, as in
// H.264 baseline. Integer motion vectors (mv_t) are in whole pels; the
// motion vector predictor and fractional vectors (qmv_t) are in quarter
// pels, the H.264 unit. The 41 variable-block-size partitions of one MB are
// numbered as follows (this numbering is this design's own):
//   0..15  4x4   index 4*row+col           (row, col in 4-pel units)
//   16..23 8x4   index 16+2*row+col        (8 wide, 4 tall; row 0..3, col 0..1)
//   24..31 4x8   index 24+4*row+col        (4 wide, 8 tall; row 0..1, col 0..3)
//   32..35 8x8   index 32+2*row+col
//   36..37 16x8  index 36+row
//   38..39 8x16  index 38+col
//   40     16x16
// The processing engines (PEs) of the flexible MB pipeline and the tasks
// the stage controls hand to them are enumerated here as well.
package me_pkg;

  localparam int MB      = 16;   // macroblock edge in pels
  localparam int PEL_W   = 8;    // bits per luma pel
  localparam int NPART   = 41;   // partitions of the VBS tree
  localparam int SAD_W   = 16;   // enough for a 16x16 SAD (max 65280)
  localparam int SAD4_W  = 12;   // enough for a 4x4 SAD (max 4080)

  typedef logic [PEL_W-1:0]  pel_t;
  typedef logic [SAD_W-1:0]  sad_t;
  typedef logic [SAD4_W-1:0] sad4_t;

  // Integer-pel motion vector.
  typedef struct packed {
    logic signed [7:0] x;
    logic signed [7:0] y;
  } mv_t;

  // Quarter-pel motion vector.
  typedef struct packed {
    logic signed [9:0] x;
    logic signed [9:0] y;
  } qmv_t;

  // Direction in which the reference array (i.e. the candidate) moves by one pel.
  typedef enum logic [2:0] {
    SH_NONE  = 3'd0,
    SH_UP    = 3'd1,   // candidate y-1: new row enters at the top
    SH_DOWN  = 3'd2,   // candidate y+1: new row enters at the bottom
    SH_LEFT  = 3'd3,   // candidate x-1: new column enters at the left
    SH_RIGHT = 3'd4    // candidate x+1: new column enters at the right
  } shift_dir_e;

  // Processing engines and helpers served by the stage controls.
  typedef enum logic [3:0] {
    PE_IME = 4'd0,  // integer motion estimation (built)
    PE_FME = 4'd1,  // fractional motion estimation (external)
    PE_MD  = 4'd2,  // inter mode decision (external)
    PE_IP  = 4'd3,  // intra prediction (external)
    PE_CMC = 4'd4,  // chroma motion compensation (external)
    PE_REC = 4'd5,  // reconstruction (external)
    PE_DB  = 4'd6,  // deblocking (external)
    PE_EC  = 4'd7,  // entropy coding (external)
    PE_LD  = 4'd8,  // loader of current MB and search window (external)
    PE_PS  = 4'd9   // pre-skip decision (built)
  } pe_e;
  localparam int NPE = 10;

  // Tasks of the three MB pipeline stages.
  typedef enum logic [3:0] {
    T_LOAD     = 4'd0,   // stage 1: load current MB and search-window columns
    T_IME_ZERO = 4'd1,   // stage 1: cost of skip candidate (0,0)
    T_SKIP_MVP = 4'd2,   // stage 1: cost of skip candidate MVP (IME or FME)
    T_PS       = 4'd3,   // stage 1: pre-skip decision
    T_IME_RF0  = 4'd4,   // stage 1: VBS four step search, reference frame 0
    T_IME_RF1  = 4'd5,   // stage 1: VBS four step search, reference frame 1
    T_FME      = 4'd6,   // stage 2: fractional refinement
    T_MD       = 4'd7,   // stage 2: inter mode decision
    T_IP       = 4'd8,   // stage 2: intra prediction
    T_CMC      = 4'd9,   // stage 2: chroma motion compensation
    T_REC      = 4'd10,  // stage 2: reconstruction
    T_DB       = 4'd11,  // stage 3: deblocking
    T_EC       = 4'd12,  // stage 3: entropy coding
    T_END      = 4'd15
  } task_e;

  // Pipelined register contents: what the stage controls keep for one MB.
  typedef struct packed {
    logic       valid;
    logic [4:0] mb_x;
    logic [4:0] mb_y;
    qmv_t       mvp;       // motion vector predictor (quarter pel)
    sad_t       cost_zero; // pre-skip cost of (0,0)
    sad_t       cost_mvp;  // pre-skip cost of MVP
    logic       skip;      // MB was pre-skipped
    qmv_t       skip_mv;   // MV of a skipped MB
    mv_t        ime_mv;    // best integer MV (16x16)
    logic       ime_rf;    // its reference frame
    sad_t       ime_sad;   // its SAD
    qmv_t       fme_mv;    // best fractional MV
    sad_t       fme_cost;  // its cost
    sad_t [NPART-1:0] part_sad;  // IME result of every partition (me_pkg order)
    mv_t  [NPART-1:0] part_mv;
    logic [NPART-1:0] part_rf;
  } mb_desc_t;

  // Quarter-pel vector of an integer vector.
  function automatic qmv_t to_qmv(mv_t v);
    qmv_t q;
    q.x = {v.x, 2'b00};
    q.y = {v.y, 2'b00};
    return q;
  endfunction

  // Integer part (floor) of a quarter-pel vector.
  function automatic mv_t to_imv(qmv_t q);
    mv_t v;
    v.x = q.x[9:2];
    v.y = q.y[9:2];
    return v;
  endfunction

endpackage
