// pre_skip_check: ME pre-skip decision.
//
// Before any motion search, the two vectors a skipped MB may use - (0,0)
// and the motion vector predictor (MVP) - are costed (by the IME engine for
// integer vectors, by the FME engine when the MVP is fractional). If the
// smaller of the two costs is below the threshold, the MB is pre-skipped:
// the IME and FME engines stay off for it and only the inter mode decision
// runs. The chosen skip vector is the cheaper one; on equal costs the MVP,
// the H.264 skip predictor, is kept.
//
// Interface and timing: start (one cycle) with the two costs, the MVP and
// the threshold; one cycle later done pulses and skip/skip_mv are valid and
// held until the next start.
//
// From the document: the two candidates, the threshold and the pre-skip
// branch of the decision flow. This design's choices: the cost is the 16x16
// SAD, the comparison is "cost < threshold", and the tie rule.
module pre_skip_check
  import me_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  sad_t cost_zero,
  input  sad_t cost_mvp,
  input  qmv_t mvp,
  input  sad_t threshold,
  output logic done,
  output logic skip,
  output qmv_t skip_mv
);

  logic mvp_better;
  sad_t min_cost;

  assign mvp_better = (cost_mvp <= cost_zero);
  assign min_cost   = mvp_better ? cost_mvp : cost_zero;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0; skip <= 1'b0; skip_mv <= '0;
    end else begin
      done <= start;
      if (start) begin
        skip    <= (min_cost < threshold);
        skip_mv <= mvp_better ? mvp : '0;
      end
    end
  end

endmodule
