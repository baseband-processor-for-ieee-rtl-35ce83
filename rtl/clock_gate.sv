// clock_gate: integrated clock-gating cell. The enable is captured by a
// latch that is transparent while the clock is low, so it cannot change
// during the high phase, and gclk = clk & latched enable. 'test_en' forces
// the clock on. This is the usual glitch-free latch-based gate; the reference architecture
// asks for clock gating per domain without giving the cell.
module clock_gate (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);
  logic en_l;
  always_latch
    if (!clk) en_l = en || test_en;
  assign gclk = clk & en_l;
endmodule
