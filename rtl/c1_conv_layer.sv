// c1_conv_layer (C1): the LeNet-5 C1 convolution layer.
//
// Convolves a 32x32 float16 image with six 5x5 float16 kernels, stride 1, no
// padding, giving a 28x28x6 float16 feature map (no bias term). An input
// selector hands the kernels to three convolution calculation modules (CON)
// in two batches of three; each CON runs 14 CUs in parallel over the row
// segments of its channel, and the output controller collects the results.
// Work begins by itself on the first clock edge after `reset` is released and
// runs once; `done` then stays high, with the map in `fmap`, until the next
// reset. `image` and `filters` must stay stable while the layer runs.
//
// Bus layouts: image pixel (r,c) at bits (r*32 + c)*16 +: 16 (16,384 bits);
// kernel k, element (ky,kx) at bits (k*25 + ky*5 + kx)*16 +: 16 (2,400 bits);
// map value (k,r,c) at bits ((k*28 + r)*28 + c)*16 +: 16 (75,264 bits). The
// three-CON / fourteen-CU structure, the bus widths and the port names of
// the waveform figure (reset, clk, image, filters, done) follow the document;
// the bit layouts, the start-after-reset behaviour and the absence of a bias
// are this design's choices.
//
// Timing at the default sizes: 2 batches x 56 passes x 28 cycles plus 5
// cycles of start-up and hand-over, 3141 clock edges from reset release to `done`.
module c1_conv_layer
  import fp16_pkg::*;
#(
  parameter int unsigned IMG     = C1_IMG,
  parameter int unsigned K       = C1_K,
  parameter int unsigned NKERNEL = C1_NKERNEL,
  parameter int unsigned NCON    = C1_NCON,
  parameter int unsigned NCU     = C1_NCU,
  localparam int unsigned OUT    = IMG - K + 1,
  localparam int unsigned NSEG   = OUT / NCU,
  localparam int unsigned NBATCH = NKERNEL / NCON,
  localparam int unsigned RW     = $clog2(OUT),
  localparam int unsigned SW     = (NSEG > 1) ? $clog2(NSEG) : 1,
  localparam int unsigned BW     = (NBATCH > 1) ? $clog2(NBATCH) : 1
) (
  input  logic                                 clk,
  input  logic                                 reset,
  input  logic [IMG*IMG*16-1:0]                image,
  input  logic [NKERNEL*K*K*16-1:0]            filters,
  output logic [NKERNEL*OUT*OUT*16-1:0]        fmap,
  output logic                                 done
);

  // geometry the structure relies on
  if (OUT % NCU != 0) begin : g_chk_ncu
    $error("NCU must divide the output side");
  end
  if (NKERNEL % NCON != 0) begin : g_chk_ncon
    $error("NCON must divide the kernel count");
  end

  fp16_t [IMG*IMG-1:0]                 image_a;
  fp16_t [NKERNEL-1:0][K*K-1:0]        filters_a;
  fp16_t [NKERNEL-1:0][OUT-1:0][OUT-1:0] fmap_a;

  logic                        go, started;
  logic  [NCON-1:0]            con_start, kernel_done, pass_valid, con_busy;
  fp16_t [NCON-1:0][K*K-1:0]   con_kernel;
  fp16_t [IMG*IMG-1:0]         con_image;
  fp16_t [NCON-1:0][NCU-1:0]   results;
  logic  [NCON-1:0][RW-1:0]    row;
  logic  [NCON-1:0][SW-1:0]    seg;
  logic  [BW-1:0]              batch;
  logic                        all_done;

  assign image_a   = image;
  assign filters_a = filters;
  assign fmap      = fmap_a;

  // one-shot start after reset
  always_ff @(posedge clk or posedge reset) begin
    if (reset) started <= 1'b0;
    else       started <= 1'b1;
  end
  assign go = !started;

  input_selector #(.IMG(IMG), .K(K), .NKERNEL(NKERNEL), .NCON(NCON)) u_sel (
    .clk         (clk),
    .reset       (reset),
    .go          (go),
    .filters     (filters_a),
    .image       (image_a),
    .kernel_done (kernel_done),
    .con_start   (con_start),
    .con_kernel  (con_kernel),
    .con_image   (con_image),
    .batch       (batch),
    .all_done    (all_done)
  );

  for (genvar c = 0; c < NCON; c++) begin : g_con
    conv_calc #(.IMG(IMG), .K(K), .NCU(NCU)) u_con (
      .clk         (clk),
      .reset       (reset),
      .start       (con_start[c]),
      .kernel_in   (con_kernel[c]),
      .image       (con_image),
      .results     (results[c]),
      .row         (row[c]),
      .seg         (seg[c]),
      .pass_valid  (pass_valid[c]),
      .kernel_done (kernel_done[c]),
      .busy        (con_busy[c])
    );
  end

  output_controller #(.IMG(IMG), .K(K), .NKERNEL(NKERNEL), .NCON(NCON), .NCU(NCU)) u_out (
    .clk        (clk),
    .reset      (reset),
    .pass_valid (pass_valid),
    .row        (row),
    .seg        (seg),
    .results    (results),
    .batch      (batch),
    .fmap       (fmap_a),
    .done       (done)
  );

  // the selector finishes in the same cycle as the last pass is reported
  a_done_with_selector: assert property (@(posedge clk) disable iff (reset)
    all_done |=> done);
  a_no_start_while_busy: assert property (@(posedge clk) disable iff (reset)
    (con_start != '0) |-> (con_busy == '0));

endmodule
