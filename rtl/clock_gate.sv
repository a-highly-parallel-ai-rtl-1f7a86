// clock_gate: clock gate for the ReLU channels.
//
// The gated clock is the system clock ANDed with an enable, as the document
// describes. So that a change of `en` while `clk` is high cannot cut a clock
// pulse short, the enable passes through a latch that is transparent only
// while `clk` is low; this latch is this design's addition to the plain AND
// and is the intended latch that lint and synthesis report here (the usual
// integrated-clock-gate structure). With `en` low `gclk` stays low and every
// flip-flop on it holds its value.
//
// Interface: clk, en in; gclk out. Timing: `en` must be settled before the
// rising edge of `clk`; it takes effect on that edge.
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
