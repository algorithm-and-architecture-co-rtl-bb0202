// fss_ctrl: four step search (FSS) controller of the IME engine.
//
// Runs the hardware-oriented fast integer motion search:
//   initialization  the 3x3 square pattern with step 2 around the start
//                   vector (normally the integer part of the MV predictor);
//   searching       while the minimum 16x16 SAD of the pattern is not at its
//                   centre, the pattern is re-centred on that minimum and
//                   only its not yet visited points are evaluated;
//   refinement      once the minimum is at the centre, its 8 neighbours at
//                   step 1 are evaluated and the best candidate is final.
// A single-candidate mode (single=1) evaluates start_mv only; the pre-skip
// check uses it for the skip vectors (0,0) and MVP. Candidates outside the
// search range [MVX_MIN,MVX_MAX] x [MVY_MIN,MVY_MAX] are not evaluated.
// Because the pattern only moves to a strictly smaller SAD the search
// always ends.
//
// The controller also plans the reference-array moves: from the array's
// current candidate it steps one pel at a time (first horizontally, then
// vertically), each step being one row or column read of the ladder-shaped
// SRAM; if the array holds nothing valid, or the target is 16 or more steps
// away, it reloads the array with 16 row reads.
//
// Interface and timing: start (one cycle) begins a search; flush=1 with
// start marks the array contents as invalid. Every cycle at most one
// operation is issued on op_* (registered): a shift (op_eval=0) names the
// line to read - column segment if op_col, starting at MB-relative pel
// (op_lx, op_ly) - and the direction the array moves; an evaluation
// (op_eval=1) asks for the SADs of candidate op_mv. The engine must return
// the 16x16 SAD of every evaluation on sad_valid/sad16, in order, some
// cycles later; the controller waits for it before the next operation.
// done pulses for one cycle with best_mv/best_sad valid from then on.
// ev_* are one-cycle event pulses for observation.
//
// From the document: the three states, the step-2 square pattern, moving on
// the local minimum of the 16x16 SAD, refinement with 8 neighbours, and the
// MVP start. This design's choices: evaluation order (centre first, so a
// tie keeps the centre), the path planning and the reload rule.
module fss_ctrl
  import me_pkg::*;
#(
  parameter int MVX_MIN = -32,
  parameter int MVX_MAX = 31,
  parameter int MVY_MIN = -16,
  parameter int MVY_MAX = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        single,
  input  logic        flush,
  input  mv_t         start_mv,
  output logic        op_valid,
  output logic        op_eval,
  output shift_dir_e  op_dir,
  output logic        op_col,
  output logic signed [8:0] op_lx,
  output logic signed [8:0] op_ly,
  output mv_t         op_mv,
  input  logic        sad_valid,
  input  sad_t        sad16,
  output logic        busy,
  output logic        done,
  output mv_t         best_mv,
  output sad_t        best_sad,
  output logic        ev_reload,
  output logic        ev_move,
  output logic        ev_refine
);

  typedef enum logic [2:0] {S_IDLE, S_PLAN, S_MOVE, S_WAIT, S_PHASE_END, S_FINISH} state_e;
  typedef enum logic [1:0] {P_SINGLE, P_INIT, P_SEARCH, P_REFINE} phase_e;

  state_e st;
  phase_e ph;
  logic [3:0] j;          // index into the evaluation order
  logic [4:0] rl;         // reload row counter
  logic       reloading;
  logic       arr_valid;
  mv_t        pos;        // candidate currently held (or being built) in the array
  mv_t        tgt;
  mv_t        center, prev_center;

  // Evaluation order over the 3x3 pattern: centre first, then raster order.
  function automatic int ord(logic [3:0] idx);
    case (idx)
      4'd0: return 4;  4'd1: return 0;  4'd2: return 1;
      4'd3: return 2;  4'd4: return 3;  4'd5: return 5;
      4'd6: return 6;  4'd7: return 7;  default: return 8;
    endcase
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic logic in_range(int x, int y);
    return x >= MVX_MIN && x <= MVX_MAX && y >= MVY_MIN && y <= MVY_MAX;
  endfunction

  function automatic logic signed [7:0] clampx(int v);
    return 8'(v < MVX_MIN ? MVX_MIN : (v > MVX_MAX ? MVX_MAX : v));
  endfunction
  function automatic logic signed [7:0] clampy(int v);
    return 8'(v < MVY_MIN ? MVY_MIN : (v > MVY_MAX ? MVY_MAX : v));
  endfunction

  // Candidate of pattern index j in the current phase, and whether to evaluate it.
  logic plan_ok;
  mv_t  plan_mv;
  always_comb begin
    int k, step, dx, dy, mx, my;
    k    = ord(j);
    step = (ph == P_REFINE) ? 1 : 2;
    dx   = (k % 3 - 1) * step;
    dy   = (k / 3 - 1) * step;
    plan_mv.x = 8'(int'(center.x) + dx);
    plan_mv.y = 8'(int'(center.y) + dy);
    mx = int'(center.x) - int'(prev_center.x);
    my = int'(center.y) - int'(prev_center.y);
    plan_ok = in_range(int'(center.x) + dx, int'(center.y) + dy);
    unique case (ph)
      P_SINGLE: plan_ok = plan_ok && (k == 4);
      P_INIT:   ;
      P_SEARCH: plan_ok = plan_ok && (k != 4)
                          && !(iabs(mx + dx) <= 2 && iabs(my + dy) <= 2);
      P_REFINE: plan_ok = plan_ok && (k != 4);
    endcase
  end

  logic [5:0] mdist;
  always_comb mdist = 6'(iabs(int'(tgt.x) - int'(pos.x)) + iabs(int'(tgt.y) - int'(pos.y)));

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ph <= P_INIT; j <= '0; rl <= '0; reloading <= 1'b0;
      arr_valid <= 1'b0; pos <= '0; tgt <= '0; center <= '0; prev_center <= '0;
      op_valid <= 1'b0; op_eval <= 1'b0; op_dir <= SH_NONE; op_col <= 1'b0;
      op_lx <= '0; op_ly <= '0; op_mv <= '0;
      done <= 1'b0; best_mv <= '0; best_sad <= '1;
      ev_reload <= 1'b0; ev_move <= 1'b0; ev_refine <= 1'b0;
    end else begin
      op_valid <= 1'b0; op_eval <= 1'b0; op_dir <= SH_NONE;
      done <= 1'b0; ev_reload <= 1'b0; ev_move <= 1'b0; ev_refine <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          center.x    <= clampx(int'(start_mv.x));
          center.y    <= clampy(int'(start_mv.y));
          prev_center <= '0;
          ph          <= single ? P_SINGLE : P_INIT;
          j           <= '0;
          best_sad    <= '1;
          if (flush) arr_valid <= 1'b0;
          st          <= S_PLAN;
        end
        S_PLAN: begin
          if (j == 4'd9) st <= S_PHASE_END;
          else if (plan_ok) begin
            tgt <= plan_mv;
            st  <= S_MOVE;
          end else j <= j + 4'd1;
        end
        S_MOVE: begin
          if (reloading) begin
            // row tgt.y+rl enters at the bottom
            op_valid <= 1'b1; op_dir <= SH_DOWN; op_col <= 1'b0;
            op_lx <= 9'(tgt.x); op_ly <= 9'(int'(tgt.y) + int'(rl));
            if (rl == 5'd15) begin
              reloading <= 1'b0; arr_valid <= 1'b1; pos <= tgt;
            end
            rl <= rl + 5'd1;
          end else if (!arr_valid || mdist >= 6'd16) begin
            reloading <= 1'b1; rl <= '0; ev_reload <= 1'b1;
          end else if (pos.x < tgt.x) begin
            op_valid <= 1'b1; op_dir <= SH_RIGHT; op_col <= 1'b1;
            op_lx <= 9'(int'(pos.x) + MB); op_ly <= 9'(pos.y);
            pos.x <= pos.x + 8'sd1;
          end else if (pos.x > tgt.x) begin
            op_valid <= 1'b1; op_dir <= SH_LEFT; op_col <= 1'b1;
            op_lx <= 9'(int'(pos.x) - 1); op_ly <= 9'(pos.y);
            pos.x <= pos.x - 8'sd1;
          end else if (pos.y < tgt.y) begin
            op_valid <= 1'b1; op_dir <= SH_DOWN; op_col <= 1'b0;
            op_lx <= 9'(pos.x); op_ly <= 9'(int'(pos.y) + MB);
            pos.y <= pos.y + 8'sd1;
          end else if (pos.y > tgt.y) begin
            op_valid <= 1'b1; op_dir <= SH_UP; op_col <= 1'b0;
            op_lx <= 9'(pos.x); op_ly <= 9'(int'(pos.y) - 1);
            pos.y <= pos.y - 8'sd1;
          end else begin
            op_valid <= 1'b1; op_eval <= 1'b1; op_mv <= tgt;
            st <= S_WAIT;
          end
        end
        S_WAIT: if (sad_valid) begin
          if (sad16 < best_sad) begin
            best_sad <= sad16;
            best_mv  <= tgt;
          end
          j  <= j + 4'd1;
          st <= S_PLAN;
        end
        S_PHASE_END: begin
          j <= '0;
          st <= S_PLAN;
          unique case (ph)
            P_INIT, P_SEARCH:
              if (best_mv == center) begin
                ph <= P_REFINE; ev_refine <= 1'b1;
              end else begin
                prev_center <= center; center <= best_mv;
                ph <= P_SEARCH; ev_move <= 1'b1;
              end
            default: st <= S_FINISH;
          endcase
        end
        S_FINISH: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
