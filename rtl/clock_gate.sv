// clock_gate: latch-based clock gate.
//
// A level-sensitive latch, transparent while clk is low, holds the enable;
// the gated clock is clk AND the latched enable. Because the latch is closed
// while clk is high, a change of en during the high phase cannot cut or
// stretch a pulse: gclk is either a whole copy of a clk pulse or stays low.
//
// Timing: en must be settled before the rising edge of clk; the pulse of clk
// that follows is passed to gclk when en was 1 at that edge.
//
// The latch (and the clock that passes through logic) is the intended
// structure of this cell, so a latch warning on en_l is expected here.
module clock_gate (
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
