// clock_gate: module-level gated clock cell.
//
// Gives a PE its own clock that runs only while the stage controls keep
// its enable high, so an idle engine burns no clock or register power. The
// enable is sampled on the falling edge and ANDed with the clock; since it
// can only change while the clock is low, the gated clock has no glitches
// (the same behaviour as a latch-based integrated clock gate).
//
// Timing: an enable that is high when the clock falls lets the next rising
// edge through. test_en forces the clock on (scan/test use).
//
// The document states that the input clock of each PE is gated as soon as
// its task ends; the cell itself is this design's choice.
module clock_gate (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);

  logic en_q;

  always_ff @(negedge clk) en_q <= en | test_en;

  assign gclk = clk & en_q;

endmodule
