// lenet_c1_accel: LeNet-5 C1 convolution followed by ReLU activation.
//
// The C1 layer (c1_conv_layer) convolves the 32x32 float16 image with the six
// 5x5 kernels into a 28x28x6 feature map. When it is done, a streamer reads
// the map one position at a time, in raster order, and feeds the six channel
// values of that position to the six-channel ReLU layer (relu_layer), one
// position per cycle. The activated values leave on `act_data` with
// `act_valid` and the position index `act_index` (= row*28 + column); channel
// k is act_data[16*k +: 16]. The consumer can pause the stream with
// `act_ready` low: the ReLU layer's enable then drops, its clocks stop and
// its outputs hold. The ReLU layer's completion flag comes out as
// `act_finished`; it is high in the cycle after the last position, when
// the ReLU input no longer changes. `done` rises after that cycle.
// The pre-activation map stays readable on `fmap`.
//
// The document builds the two layers as separate modules and leaves their
// integration open; the streamer, the raster order and the `act_ready` pause
// are this design's choices. Reset is asynchronous and active high; the
// convolution starts on the first edge after reset is released.
//
// Timing at the default sizes: 3141 cycles of convolution, then 784 stream
// cycles (plus any pause cycles) and one cycle of ReLU latency.
module lenet_c1_accel
  import fp16_pkg::*;
#(
  parameter int unsigned IMG     = C1_IMG,
  parameter int unsigned K       = C1_K,
  parameter int unsigned NKERNEL = C1_NKERNEL,
  parameter int unsigned NCON    = C1_NCON,
  parameter int unsigned NCU     = C1_NCU,
  localparam int unsigned OUT    = IMG - K + 1,
  localparam int unsigned NPIX   = OUT * OUT,
  localparam int unsigned IW     = $clog2(NPIX),
  localparam int unsigned RW     = $clog2(OUT)
) (
  input  logic                           clk,
  input  logic                           reset,
  input  logic [IMG*IMG*16-1:0]          image,
  input  logic [NKERNEL*K*K*16-1:0]      filters,
  input  logic                           act_ready,
  output logic [NKERNEL*OUT*OUT*16-1:0]  fmap,
  output logic                           conv_done,
  output logic [NKERNEL*16-1:0]          act_data,
  output logic                           act_valid,
  output logic [IW-1:0]                  act_index,
  output logic                           act_finished,
  output logic                           done
);

  typedef enum logic [1:0] {ST_CONV, ST_STREAM, ST_DRAIN, ST_DONE} top_state_t;

  top_state_t                               state;
  logic [RW-1:0]                            srow, scol;   // stream position
  logic                                     last_pos;
  logic                                     stream_en, relu_en;
  logic [NKERNEL*16-1:0]                    relu_in;
  fp16_t [NKERNEL-1:0][OUT-1:0][OUT-1:0]    fmap_a;
  fp16_t [NKERNEL-1:0][OUT-1:0]             map_row;

  c1_conv_layer #(.IMG(IMG), .K(K), .NKERNEL(NKERNEL), .NCON(NCON), .NCU(NCU)) u_c1 (
    .clk     (clk),
    .reset   (reset),
    .image   (image),
    .filters (filters),
    .fmap    (fmap),
    .done    (conv_done)
  );

  assign fmap_a  = fmap;
  // the ReLU layer also stays enabled for the drain cycle after the last
  // position: its input is then unchanged, so its completion flag rises
  assign stream_en = (state == ST_STREAM) && act_ready;
  assign relu_en   = stream_en || (state == ST_DRAIN);

  // read the six channel values at (srow, scol): select the row, then the
  // column
  always_comb begin
    map_row = '0;
    for (int r = 0; r < int'(OUT); r++) begin
      if (srow == RW'(r)) begin
        for (int k = 0; k < int'(NKERNEL); k++) map_row[k] = fmap_a[k][r];
      end
    end
    relu_in = '0;
    for (int c = 0; c < int'(OUT); c++) begin
      if (scol == RW'(c)) begin
        for (int k = 0; k < int'(NKERNEL); k++) relu_in[16*k +: 16] = map_row[k][c];
      end
    end
  end

  assign last_pos = (srow == RW'(OUT - 1)) && (scol == RW'(OUT - 1));

  relu_layer #(.NCH(NKERNEL)) u_relu (
    .clk      (clk),
    .reset    (reset),
    .enable   (relu_en),
    .x_input  (relu_in),
    .Output   (act_data),
    .Finished (act_finished)
  );

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state     <= ST_CONV;
      srow      <= '0;
      scol      <= '0;
      act_valid <= 1'b0;
      act_index <= '0;
    end else begin
      act_valid <= stream_en;
      if (stream_en) act_index <= IW'(srow) * IW'(OUT) + IW'(scol);
      unique case (state)
        ST_CONV:   if (conv_done) state <= ST_STREAM;
        ST_STREAM: if (stream_en) begin
          if (last_pos) begin
            state <= ST_DRAIN;
          end else if (scol == RW'(OUT - 1)) begin
            scol <= '0;
            srow <= srow + 1'b1;
          end else begin
            scol <= scol + 1'b1;
          end
        end
        ST_DRAIN:  state <= ST_DONE;
        default:   state <= ST_DONE;
      endcase
    end
  end

  assign done = (state == ST_DONE);

endmodule
