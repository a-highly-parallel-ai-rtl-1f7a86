// conv_calc (CON): one convolution calculation module of the C1 layer.
//
// Holds the current kernel in its FILTER register, an RF (conv_rf) that
// slides the window over the image, and NCU (14) CUs (conv_unit) that run in
// lockstep, each computing one output pixel of the current row segment. All
// CUs get the same 400-bit kernel and their own 400-bit window and return a
// 16-bit result. `start` loads `kernel_in` into FILTER and makes the RF run
// over every output position of the channel; each finished pass is reported
// with `pass_valid`, the row and segment, and the NCU results.
//
// Structure (RF, FILTER, 14 CUs) follows the document; the FILTER register
// loaded on `start` and the handshake are this design's choices. All CUs
// start together, so CU 0's `done` stands for all of them (an assertion
// checks that they agree).
//
// Interface: clk, reset, start, kernel_in, image in; results, row, seg,
// pass_valid, kernel_done, busy out. Timing: OUT*NSEG passes of 28 cycles
// per kernel (56 passes, 1568 cycles at the default sizes).
module conv_calc
  import fp16_pkg::*;
#(
  parameter int unsigned IMG = C1_IMG,
  parameter int unsigned K   = C1_K,
  parameter int unsigned NCU = C1_NCU,
  localparam int unsigned OUT  = IMG - K + 1,
  localparam int unsigned NSEG = OUT / NCU,
  localparam int unsigned RW   = $clog2(OUT),
  localparam int unsigned SW   = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic                     start,
  input  fp16_t [K*K-1:0]          kernel_in,
  input  fp16_t [IMG*IMG-1:0]      image,
  output fp16_t [NCU-1:0]          results,
  output logic  [RW-1:0]           row,
  output logic  [SW-1:0]           seg,
  output logic                     pass_valid,
  output logic                     kernel_done,
  output logic                     busy
);

  fp16_t [K*K-1:0]           filter_q;
  fp16_t [NCU-1:0][K*K-1:0]  windows;
  logic                      cu_start;
  logic  [NCU-1:0]           cu_done;
  logic  [NCU-1:0]           cu_busy;

  always_ff @(posedge clk or posedge reset) begin
    if (reset)      filter_q <= '0;
    else if (start) filter_q <= kernel_in;
  end

  conv_rf #(.IMG(IMG), .K(K), .NCU(NCU)) u_rf (
    .clk         (clk),
    .reset       (reset),
    .start       (start),
    .image       (image),
    .cu_done     (cu_done[0]),
    .cu_start    (cu_start),
    .windows     (windows),
    .row         (row),
    .seg         (seg),
    .pass_valid  (pass_valid),
    .kernel_done (kernel_done),
    .busy        (busy)
  );

  for (genvar j = 0; j < NCU; j++) begin : g_cu
    conv_unit #(.K(K)) u_cu (
      .clk    (clk),
      .reset  (reset),
      .start  (cu_start),
      .filter (filter_q),
      .window (windows[j]),
      .result (results[j]),
      .done   (cu_done[j]),
      .busy   (cu_busy[j])
    );
  end

  a_cus_in_lockstep: assert property (@(posedge clk) disable iff (reset)
    ((cu_done == '0) || (cu_done == '1)) && ((cu_busy == '0) || (cu_busy == '1)));

endmodule
