// mb_stage_ctrl: flexible macroblock pipelining - the stage controls.
//
// The encoder pipeline is split into stage controls and processing engines
// (PEs). Each of the three stage controls holds the pipelined registers of
// one MB (mb_desc_t) and works through its list of tasks, handing each task
// with the MB's intermediate data to a PE and storing the PE's results back
// into its registers when the PE reports done. Because the data live in the
// stage controls and not in the PEs, one PE can serve several stages: the
// FME engine costs a fractional MVP for the pre-skip check in stage 1 and
// refines vectors in stage 2, and the IME engine both costs the skip
// candidates and searches. When two stages want the same PE, the stage
// holding the older MB (the later stage) is served first.
//
// Task lists (T_* in me_pkg):
//   stage 1  LOAD, [IME_ZERO, SKIP_MVP, PS]    pre-skip check, low-power mode only
//            IME_RF0, [IME_RF1]                not for a pre-skipped MB; RF1 in
//                                              high-quality mode only
//   stage 2  [FME] (not for a pre-skipped MB), MD, IP, CMC, REC
//   stage 3  DB, EC
// SKIP_MVP goes to the IME engine when the MVP is an integer vector and to
// the FME engine when it is fractional.
//
// Clock gating: pe_en[p] is high from the cycle a task is handed to PE p
// until the controller has seen its done pulse, and drives that PE's clock
// gate, so each PE is clocked only while it works.
//
// Interface and timing: a new MB is accepted (mb_valid && mb_ready) when
// every stage has finished; at that edge all MBs move one stage on and the
// MB leaving stage 3 is presented for one cycle on out_valid/out_desc. A
// task start is a one-cycle pulse on pe_start[p] with pe_task[p] and
// pe_desc[p] held until done; a PE answers with a one-cycle pe_done[p]
// pulse, at least one cycle after the start, with its result on the
// matching result inputs.
//
// From the document: three stage controls with pipelined registers, task
// assignment to PEs, PEs usable in any stage, pre-skip before IME/FME,
// gating a PE's clock when its task ends, the two modes. This design's
// choices: which task runs in which stage, their order, the arbitration and
// the handshake.
module mb_stage_ctrl
  import me_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     low_power,      // 1: one RF and pre-skip on; 0: two RFs, pre-skip off
  // MB input
  input  logic     mb_valid,
  output logic     mb_ready,
  input  logic [4:0] mb_x,
  input  logic [4:0] mb_y,
  input  qmv_t     mb_mvp,
  // PE task interface
  output logic     pe_start [NPE],
  output task_e    pe_task  [NPE],
  output mb_desc_t pe_desc  [NPE],
  output logic     pe_en    [NPE],
  input  logic     pe_done  [NPE],
  // PE results
  input  sad_t     ime_sad,
  input  mv_t      ime_mv,
  input  logic     ime_rf,
  input  sad_t     ime_part_sad [NPART],
  input  mv_t      ime_part_mv  [NPART],
  input  logic     ime_part_rf  [NPART],
  input  sad_t     fme_cost,
  input  qmv_t     fme_mv,
  input  logic     ps_skip,
  input  qmv_t     ps_mv,
  // finished MBs
  output logic     out_valid,
  output mb_desc_t out_desc,
  // observation
  output logic     ev_conflict,    // a stage waits for a PE held by another stage
  output logic     ev_shared       // a PE was started by a stage other than its first
);

  typedef enum logic [1:0] {SS_ISSUE, SS_WAIT, SS_DONE} sstate_e;

  mb_desc_t desc [3];
  sstate_e  sst  [3];
  logic [2:0] step [3];
  pe_e      own  [3];          // PE a waiting stage is using
  logic     busy [NPE];
  logic [1:0] owner [NPE];     // stage that handed PE p its current task

  function automatic task_e task_at(int s, logic [2:0] k);
    case (s)
      0: case (k)
           3'd0: return T_LOAD;    3'd1: return T_IME_ZERO; 3'd2: return T_SKIP_MVP;
           3'd3: return T_PS;      3'd4: return T_IME_RF0;  3'd5: return T_IME_RF1;
           default: return T_END;
         endcase
      1: case (k)
           3'd0: return T_FME; 3'd1: return T_MD;  3'd2: return T_IP;
           3'd3: return T_CMC; 3'd4: return T_REC;
           default: return T_END;
         endcase
      default: case (k)
           3'd0: return T_DB; 3'd1: return T_EC;
           default: return T_END;
         endcase
    endcase
  endfunction

  function automatic logic mvp_is_int(qmv_t v);
    return v.x[1:0] == 2'b00 && v.y[1:0] == 2'b00;
  endfunction

  function automatic pe_e task_pe(task_e t, mb_desc_t d);
    case (t)
      T_LOAD:                          return PE_LD;
      T_IME_ZERO, T_IME_RF0, T_IME_RF1: return PE_IME;
      T_SKIP_MVP:                      return mvp_is_int(d.mvp) ? PE_IME : PE_FME;
      T_PS:                            return PE_PS;
      T_FME:                           return PE_FME;
      T_MD:                            return PE_MD;
      T_IP:                            return PE_IP;
      T_CMC:                           return PE_CMC;
      T_REC:                           return PE_REC;
      T_DB:                            return PE_DB;
      default:                         return PE_EC;
    endcase
  endfunction

  function automatic logic task_on(task_e t, mb_desc_t d, logic lp);
    case (t)
      T_IME_ZERO, T_SKIP_MVP, T_PS: return lp;
      T_IME_RF0, T_FME:             return !d.skip;
      T_IME_RF1:                    return !d.skip && !lp;
      default:                      return 1'b1;
    endcase
  endfunction

  // Requests and grants: a stage in SS_ISSUE whose current task is enabled
  // asks for that task's PE; the latest stage wins an idle PE.
  logic  req   [3];
  pe_e   req_pe[3];
  task_e cur_t [3];
  logic  grant [3];

  always_comb begin
    for (int s = 0; s < 3; s++) begin
      cur_t[s]  = task_at(s, step[s]);
      req_pe[s] = task_pe(cur_t[s], desc[s]);
      req[s]    = desc[s].valid && sst[s] == SS_ISSUE && cur_t[s] != T_END
                  && task_on(cur_t[s], desc[s], low_power);
    end
    for (int s = 2; s >= 0; s--) begin
      grant[s] = req[s] && !busy[req_pe[s]];
      for (int h = s + 1; h < 3; h++)
        if (grant[h] && req_pe[h] == req_pe[s]) grant[s] = 1'b0;
    end
  end

  logic all_done;
  always_comb begin
    all_done = 1'b1;
    for (int s = 0; s < 3; s++)
      if (desc[s].valid && sst[s] != SS_DONE) all_done = 1'b0;
  end
  assign mb_ready = all_done;

  always_comb begin
    ev_conflict = 1'b0;
    for (int s = 0; s < 3; s++)
      if (req[s] && !grant[s]) ev_conflict = 1'b1;
  end

  // A PE reads the pipelined registers of the stage that gave it its task.
  always_comb
    for (int p = 0; p < NPE; p++) begin
      pe_en[p]   = busy[p];
      pe_desc[p] = desc[owner[p]];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 3; s++) begin
        desc[s] <= '0; sst[s] <= SS_ISSUE; step[s] <= '0; own[s] <= PE_IME;
      end
      for (int p = 0; p < NPE; p++) begin
        busy[p] <= 1'b0; pe_start[p] <= 1'b0; pe_task[p] <= T_END; owner[p] <= '0;
      end
      out_valid <= 1'b0; out_desc <= '0; ev_shared <= 1'b0;
    end else begin
      for (int p = 0; p < NPE; p++) pe_start[p] <= 1'b0;
      out_valid <= 1'b0;
      ev_shared <= 1'b0;

      if (all_done && (mb_valid || desc[0].valid || desc[1].valid || desc[2].valid)) begin
        // advance the MB pipeline
        out_valid <= desc[2].valid;
        out_desc  <= desc[2];
        desc[2]   <= desc[1];
        desc[1]   <= desc[0];
        desc[0]   <= '0;
        if (mb_valid) begin
          desc[0].valid <= 1'b1;
          desc[0].mb_x  <= mb_x;
          desc[0].mb_y  <= mb_y;
          desc[0].mvp   <= mb_mvp;
        end
        for (int s = 0; s < 3; s++) begin
          sst[s] <= SS_ISSUE; step[s] <= '0;
        end
      end else begin
        for (int s = 0; s < 3; s++) begin
          unique case (sst[s])
            SS_ISSUE:
              if (desc[s].valid) begin
                if (cur_t[s] == T_END) sst[s] <= SS_DONE;
                else if (!task_on(cur_t[s], desc[s], low_power)) step[s] <= step[s] + 3'd1;
                else if (grant[s]) begin
                  pe_start[req_pe[s]] <= 1'b1;
                  pe_task[req_pe[s]]  <= cur_t[s];
                  owner[req_pe[s]]    <= 2'(s);
                  busy[req_pe[s]]     <= 1'b1;
                  own[s]              <= req_pe[s];
                  sst[s]              <= SS_WAIT;
                  if (req_pe[s] == PE_FME && s == 0) ev_shared <= 1'b1;
                end
              end
            SS_WAIT:
              if (pe_done[own[s]]) begin
                busy[own[s]] <= 1'b0;
                step[s]      <= step[s] + 3'd1;
                sst[s]       <= SS_ISSUE;
                unique case (cur_t[s])
                  T_IME_ZERO: desc[s].cost_zero <= ime_sad;
                  T_SKIP_MVP: desc[s].cost_mvp  <= (own[s] == PE_IME) ? ime_sad : fme_cost;
                  T_PS: begin
                    desc[s].skip    <= ps_skip;
                    desc[s].skip_mv <= ps_mv;
                  end
                  T_IME_RF0, T_IME_RF1: begin
                    desc[s].ime_mv  <= ime_mv;
                    desc[s].ime_rf  <= ime_rf;
                    desc[s].ime_sad <= ime_sad;
                    for (int q = 0; q < NPART; q++) begin
                      desc[s].part_sad[q] <= ime_part_sad[q];
                      desc[s].part_mv[q]  <= ime_part_mv[q];
                      desc[s].part_rf[q]  <= ime_part_rf[q];
                    end
                  end
                  T_FME: begin
                    desc[s].fme_mv   <= fme_mv;
                    desc[s].fme_cost <= fme_cost;
                  end
                  default: ;
                endcase
              end
            default: ;
          endcase
        end
      end
    end
  end

  // Handshake rules: a task only goes to an idle PE, and one stage at most
  // wins a PE in a cycle.
  always_ff @(posedge clk)
    for (int s = 0; s < 3; s++) begin
      if (grant[s])
        assert (!busy[req_pe[s]]) else $error("PE %0d granted while busy", req_pe[s]);
      for (int h = s + 1; h < 3; h++)
        if (grant[s] && grant[h])
          assert (req_pe[s] != req_pe[h]) else $error("PE %0d granted twice", req_pe[s]);
    end

endmodule
