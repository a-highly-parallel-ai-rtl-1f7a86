// gated_clock_relu: one float16 ReLU channel on a gated clock.
//
// On every edge of its gated clock (system clock AND `enable`) the channel
// registers ReLU(x) in `OutputFinal`: zero if the sign bit of x is set, x
// itself otherwise, so the result appears one clock cycle after the input.
// It also keeps the input it last processed; `Finished` is high when a result
// has been produced and the input still equals that processed value. A new
// input therefore clears `Finished` at once, and the next enabled edge sets
// it again. With `enable` low the clock stops: `OutputFinal` and the stored
// input hold, and `Finished` keeps its last state (the layer above masks it).
// `reset` is asynchronous and active high and clears everything.
//
// The sign-bit ReLU, the single-cycle latency, the gated clock and the port
// names follow the document; the exact rule for `Finished` (compare with
// the last processed input) is this design's reading of its "detects new
// inputs and resets the completion signal automatically".
//
// Interface: clk, enable, reset, x in; OutputFinal, Finished out.
module gated_clock_relu
  import fp16_pkg::*;
(
  input  logic  clk,
  input  logic  enable,
  input  logic  reset,
  input  fp16_t x,
  output fp16_t OutputFinal,
  output logic  Finished
);

  logic  gated_clk;
  logic  produced;
  fp16_t x_seen;

  clock_gate u_cg (.clk(clk), .en(enable), .gclk(gated_clk));

  always_ff @(posedge gated_clk or posedge reset) begin
    if (reset) begin
      OutputFinal <= FP16_PZERO;
      x_seen      <= FP16_PZERO;
      produced    <= 1'b0;
    end else begin
      OutputFinal <= relu16(x);
      x_seen      <= x;
      produced    <= 1'b1;
    end
  end

  assign Finished = produced && (x == x_seen);

endmodule
