// relu_layer: six-channel parallel ReLU activation layer.
//
// Six gated_clock_relu channels process the six float16 values of one
// feature-map position at once: channel ch takes x_input[16*ch +: 16] and
// drives Output[16*ch +: 16]. Every enabled clock cycle accepts 96 input bits
// and, one cycle later, presents 96 result bits. `Finished` is the AND of the
// six channel flags, gated by `enable`: high once all six results are out
// and the input has not changed since, low while the layer is disabled. With
// `enable` low the channel clocks stop and `Output` keeps its value.
//
// The six-channel structure, the gated clocks, the single-cycle latency, the
// AND of the completion flags and the port names follow the document. The
// document's schematic also shows an extra register stage on Output and
// Finished clocked by the free-running clock; it is left out here because
// the text gives the whole layer a latency of one cycle, which that stage
// would double.
//
// Interface: clk, reset (async, active high), enable, x_input in; Output,
// Finished out.
module relu_layer
  import fp16_pkg::*;
#(
  parameter int unsigned NCH = C1_NKERNEL
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              enable,
  input  logic [NCH*16-1:0] x_input,
  output logic [NCH*16-1:0] Output,
  output logic              Finished
);

  logic [NCH-1:0] ch_finished;

  for (genvar ch = 0; ch < NCH; ch++) begin : relu_array
    gated_clock_relu relu_inst (
      .clk         (clk),
      .enable      (enable),
      .reset       (reset),
      .x           (x_input[16*ch +: 16]),
      .OutputFinal (Output[16*ch +: 16]),
      .Finished    (ch_finished[ch])
    );
  end

  assign Finished = enable && (&ch_finished);

endmodule
