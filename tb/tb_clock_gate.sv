// tb_clock_gate: self-checking testbench of the module-level clock gate.
// A counter on the gated clock must advance exactly once per cycle whose
// enable was high at the preceding falling edge; enable changes at random
// times inside the high phase must not create glitches (the gated clock is
// never high while the clock is low, and never rises except with the clock);
// test_en forces the clock on.
module tb_clock_gate;
  logic clk = 0, en = 0, test_en = 0, gclk;
  int checks = 0, failures = 0;
  int gcount = 0, expected = 0;
  logic en_at_fall = 0;

  clock_gate dut (.*);

  always #5 clk = ~clk;
  always @(posedge gclk) gcount++;
  always @(negedge clk) en_at_fall <= en | test_en;
  always @(posedge clk) if (en_at_fall) expected++;
  // glitch watch
  always @(gclk) begin
    checks++;
    if (gclk && !clk) begin failures++; $display("gclk high while clk low at %0t", $time); end
  end
  always @(posedge gclk) begin
    checks++;
    if (!clk) failures++;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      #($urandom % 10 + 1);
      en = 1'($urandom);
      if (n > 800) test_en = 1'($urandom);
    end
    @(posedge clk); #1;
    checks++;
    if (gcount != expected) begin
      failures++; $display("gated edges %0d expected %0d", gcount, expected);
    end
    $display("gated edges %0d", gcount);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
