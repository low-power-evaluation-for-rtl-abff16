// clock_gate: latch-based integrated clock-gating cell.
//
// The enable is captured by a latch that is transparent while `clk` is low
// and ANDed with `clk`, so `gclk` only ever carries whole high pulses: a
// change of `en` during the high phase cannot clip or create a pulse.
// Timing: `en` sampled at a rising edge of `clk` decides whether that edge
// (and its high phase) reaches `gclk`. `test_en` forces the clock on.
// The latch is intentional: it is the standard glitch-free gating structure
// that a synthesis tool inserts for an enabled register bank.
module clock_gate (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en | test_en;
  end

  assign gclk = clk & en_l;

endmodule
