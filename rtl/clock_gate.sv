// clock_gate: latch-based clock gate for the LP-SB output registers.
//
// gclk follows clk only in cycles where en was high before the rising edge.
// en is captured by a latch that is transparent while clk is low and holds
// while clk is high, so a change of en during the high phase cannot chop or
// glitch the gated pulse; gclk = clk & en_latched. This is the usual
// integrated clock-gating cell. Which gating cell to use is this design's
// choice: the accelerator it follows only states that the output register's
// clock is gated by the enable. On an FPGA the same function would map to a
// clock-enable on the flip-flops or a dedicated clock-control block.
//
// Timing: assert en during a cycle to let the rising edge that ends it
// through; with en low gclk stays low for the whole cycle.
//
// The level-sensitive latch is intended: it is what makes the gate glitch-free.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule
