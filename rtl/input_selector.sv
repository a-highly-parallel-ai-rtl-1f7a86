// input_selector: kernel scheduler and input distributor of the C1 layer.
//
// The C1 layer has NKERNEL (6) kernels but only NCON (3) calculation modules,
// so the kernels are processed in NKERNEL/NCON (2) batches of three. For
// batch b, CON c receives kernel b*NCON + c together with the whole input
// image, and all CONs are started at once. The selector then waits until
// every CON has reported `kernel_done` for this batch and switches the CON
// inputs to the next batch of kernels. After the last batch it pulses
// `all_done`. `batch` tells the output controller which kernels the CON
// results belong to.
//
// The batch-of-three switching and the role of the block follow the
// document; the state machine, the kernel layout in the `filters` bus
// (kernel k, element ky*K+kx at index k*K*K + ky*K + kx) and the one-shot
// `go` input are this design's choices.
//
// Interface: clk, reset, go, filters, image, kernel_done in; con_start,
// con_kernel, con_image, batch, all_done out. Timing: `con_start` pulses one
// cycle after `go` and one cycle after the last CON of a batch finishes.
module input_selector
  import fp16_pkg::*;
#(
  parameter int unsigned IMG     = C1_IMG,
  parameter int unsigned K       = C1_K,
  parameter int unsigned NKERNEL = C1_NKERNEL,
  parameter int unsigned NCON    = C1_NCON,
  localparam int unsigned NBATCH = NKERNEL / NCON,
  localparam int unsigned BW     = (NBATCH > 1) ? $clog2(NBATCH) : 1
) (
  input  logic                               clk,
  input  logic                               reset,
  input  logic                               go,
  input  fp16_t [NKERNEL-1:0][K*K-1:0]       filters,
  input  fp16_t [IMG*IMG-1:0]                image,
  input  logic  [NCON-1:0]                   kernel_done,
  output logic  [NCON-1:0]                   con_start,
  output fp16_t [NCON-1:0][K*K-1:0]          con_kernel,
  output fp16_t [IMG*IMG-1:0]                con_image,
  output logic  [BW-1:0]                     batch,
  output logic                               all_done
);

  typedef enum logic [1:0] {SEL_IDLE, SEL_START, SEL_WAIT} sel_state_t;

  sel_state_t      state;
  logic [NCON-1:0] finished;
  logic [NCON-1:0] finished_next;

  assign finished_next = finished | kernel_done;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state    <= SEL_IDLE;
      batch    <= '0;
      finished <= '0;
    end else begin
      unique case (state)
        SEL_IDLE: if (go) begin
          state <= SEL_START;
          batch <= '0;
        end
        SEL_START: begin
          state    <= SEL_WAIT;
          finished <= '0;
        end
        SEL_WAIT: begin
          finished <= finished_next;
          if (finished_next == '1) begin
            if (batch == BW'(NBATCH - 1)) begin
              state <= SEL_IDLE;
            end else begin
              batch <= batch + 1'b1;
              state <= SEL_START;
            end
          end
        end
        default: state <= SEL_IDLE;
      endcase
    end
  end

  assign con_start = (state == SEL_START) ? '1 : '0;
  assign all_done  = (state == SEL_WAIT) && (finished_next == '1) &&
                     (batch == BW'(NBATCH - 1));
  assign con_image = image;

  always_comb begin
    for (int c = 0; c < int'(NCON); c++) begin
      con_kernel[c] = filters[int'(batch) * NCON + c];
    end
  end

endmodule
