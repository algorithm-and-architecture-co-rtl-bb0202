// decision_unit: decision unit and SAD buffer of the IME engine.
//
// For each of the 41 partitions it keeps the smallest SAD met so far during
// a search, with the motion vector and reference frame that gave it. On a
// cycle with upd=1 every partition whose new SAD is strictly smaller than
// its stored one takes the new SAD, mv and rf (on ties the earlier candidate
// stays). clear=1 empties the buffer (all SADs to the maximum) and takes
// priority over upd. Outputs are the registered buffer contents.
//
// The document names this unit; the strict-less rule and the clear input
// are this design's choices.
module decision_unit
  import me_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic upd,
  input  sad_t sad     [NPART],
  input  mv_t  mv,
  input  logic rf,
  output sad_t best_sad [NPART],
  output mv_t  best_mv  [NPART],
  output logic best_rf  [NPART]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPART; p++) begin
        best_sad[p] <= '1;
        best_mv[p]  <= '0;
        best_rf[p]  <= 1'b0;
      end
    end else if (clear) begin
      for (int p = 0; p < NPART; p++) begin
        best_sad[p] <= '1;
        best_mv[p]  <= '0;
        best_rf[p]  <= 1'b0;
      end
    end else if (upd) begin
      for (int p = 0; p < NPART; p++)
        if (sad[p] < best_sad[p]) begin
          best_sad[p] <= sad[p];
          best_mv[p]  <= mv;
          best_rf[p]  <= rf;
        end
    end
  end

endmodule
