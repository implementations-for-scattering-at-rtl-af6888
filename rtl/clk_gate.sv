// Clock gate: gclk = clk AND enable.
//
// The enable is held in a latch that is transparent while clk is low, so it cannot
// change while clk is high and the AND output carries only whole clock pulses. A bare
// AND gate, as drawn for the toggle output stage, would pass a spurious edge whenever
// its enable rose during the high phase of clk, which happens here because the ROM
// address changes just after the rising edge. The latch is intended (it is the
// usual integrated clock-gate cell) and is this design's addition.
//
// Interface: clk, en (sampled during the low phase), gclk.
// Timing: the pulse of clk that starts at a rising edge appears on gclk when en
// was high just before that edge.
module clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
