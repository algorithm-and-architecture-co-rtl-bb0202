// ref_pel_array: 16x16 reference-pel systolic array of the IME engine.
//
// The array holds the reference block of the candidate being evaluated and
// presents all 256 pels at once to the processing units. On a shift one new
// 16-pel line (read from the search-window SRAM) enters at one edge and the
// other 15 lines move one place towards the opposite edge, so moving the
// candidate by one pel costs one SRAM access and reuses 240 pels
// (inter-candidate data reuse). SH_DOWN (new row at the bottom) is the
// row-by-row loading of the document's 2-D adder tree; SH_UP, SH_LEFT and
// SH_RIGHT use the same registers so that the four step search can move in
// any direction, which the ladder-shaped SRAM makes possible. The
// four-direction shift network is this design's reading of that combination.
//
// Timing: pels[][] changes on the clock edge at which shift is not SH_NONE.
// pels[r][c] is row r (0 = top), column c (0 = left). No reset: contents are
// only used after the controller has loaded 16 lines.
module ref_pel_array
  import me_pkg::*;
#(
  parameter int N = MB
) (
  input  logic       clk,
  input  shift_dir_e shift,
  input  pel_t       line_in [N],   // new row (index = column) or column (index = row)
  output pel_t       pels    [N][N]
);

  pel_t q [N][N];

  always_ff @(posedge clk) begin
    unique case (shift)
      SH_DOWN:  for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
                  q[r][c] <= (r == N-1) ? line_in[c] : q[r+1][c];
      SH_UP:    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
                  q[r][c] <= (r == 0)   ? line_in[c] : q[r-1][c];
      SH_RIGHT: for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
                  q[r][c] <= (c == N-1) ? line_in[r] : q[r][c+1];
      SH_LEFT:  for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
                  q[r][c] <= (c == 0)   ? line_in[r] : q[r][c-1];
      default: ;
    endcase
  end

  assign pels = q;

endmodule
