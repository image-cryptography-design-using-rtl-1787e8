// clock_gating: integrated clock-gating cell (CGIC).
//
// A level-sensitive latch, transparent while clk is low, holds the enable;
// the gated clock is clk AND the latched enable. Because the latch is closed
// while clk is high, a change of en during the high phase cannot chop a
// clock pulse: gclk either copies a whole clk pulse or stays low for it.
// The latch-plus-AND structure is the cell the design is built around; the
// latch is intended and is why a latch warning stands for this module.
//
// Interface: clk in, en in (sampled while clk is low), gclk out.
// Timing: en set up before the rising edge of clk lets that edge through.
module clock_gating (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;
endmodule
