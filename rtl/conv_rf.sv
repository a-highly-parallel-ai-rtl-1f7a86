// conv_rf (RF): sliding-window input filter and pass sequencer of one CON.
//
// The RF decides which part of the input image each CU sees. An output row of
// OUT = IMG-K+1 (28) pixels is split into NSEG = OUT/NCU (2) segments of NCU
// (14) adjacent pixels; in one pass the NCU CUs compute one segment in
// parallel, CU j taking the window whose top-left corner is image pixel
// (row, seg*NCU + j). The RF counts the passes in its row/segment registers
// (row-major, segment fastest), which moves the kernel window across the
// image with stride 1 and no padding. It starts the CUs, waits for them to
// report `done`, announces the finished pass with `pass_valid` (row and seg
// still showing that pass) and starts the next pass in the same cycle. After
// OUT*NSEG passes it pulses `kernel_done`, which tells the input selector
// that this CON's kernel is finished.
//
// The document gives the RF's role (window sliding by an internal counter)
// and the 14-CU split; the row/segment order, the handshake and the image
// layout (pixel (r,c) at index r*IMG + c) are this design's choices.
//
// Interface: clk, reset, start, image, cu_done in; cu_start, windows, row,
// seg, pass_valid, kernel_done, busy out. Timing: a pass lasts the CU's 27
// cycles plus one hand-over cycle; the first pass starts two edges after
// `start`.
module conv_rf
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
  input  logic                          clk,
  input  logic                          reset,
  input  logic                          start,
  input  fp16_t [IMG*IMG-1:0]           image,
  input  logic                          cu_done,
  output logic                          cu_start,
  output fp16_t [NCU-1:0][K*K-1:0]      windows,
  output logic [RW-1:0]                 row,
  output logic [SW-1:0]                 seg,
  output logic                          pass_valid,
  output logic                          kernel_done,
  output logic                          busy
);

  typedef enum logic [1:0] {RF_IDLE, RF_ISSUE, RF_WAIT} rf_state_t;

  rf_state_t state;
  logic      last_pass;

  assign last_pass = (row == RW'(OUT - 1)) && (seg == SW'(NSEG - 1));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= RF_IDLE;
      row   <= '0;
      seg   <= '0;
    end else begin
      unique case (state)
        RF_IDLE: if (start) begin
          state <= RF_ISSUE;
          row   <= '0;
          seg   <= '0;
        end
        RF_ISSUE: state <= RF_WAIT;
        RF_WAIT: if (cu_done) begin
          if (last_pass) begin
            state <= RF_IDLE;
          end else if (seg == SW'(NSEG - 1)) begin
            seg <= '0;
            row <= row + 1'b1;
          end else begin
            seg <= seg + 1'b1;
          end
        end
        default: state <= RF_IDLE;
      endcase
    end
  end

  assign pass_valid  = (state == RF_WAIT) && cu_done;
  assign kernel_done = pass_valid && last_pass;
  assign cu_start    = (state == RF_ISSUE) || (pass_valid && !last_pass);
  assign busy        = (state != RF_IDLE);

  // Window selection in two steps. First the K image rows under the kernel
  // (rows row .. row+K-1) are picked out of the image (an OUT-way choice per
  // row slot); then CU j takes columns seg*NCU+j .. seg*NCU+j+K-1 of those
  // rows (an NSEG-way choice).
  fp16_t [K-1:0][IMG-1:0] band;

  for (genvar ky = 0; ky < K; ky++) begin : g_band_row
    for (genvar c = 0; c < IMG; c++) begin : g_band_col
      always_comb begin
        band[ky][c] = '0;
        for (int r = 0; r < int'(OUT); r++) begin
          if (row == RW'(r)) band[ky][c] = image[(r + ky) * IMG + c];
        end
      end
    end
  end

  for (genvar j = 0; j < NCU; j++) begin : g_win_cu
    for (genvar ky = 0; ky < K; ky++) begin : g_win_row
      for (genvar kx = 0; kx < K; kx++) begin : g_win_col
        always_comb begin
          windows[j][ky*K + kx] = '0;
          for (int s = 0; s < int'(NSEG); s++) begin
            if (seg == SW'(s)) windows[j][ky*K + kx] = band[ky][s * NCU + j + kx];
          end
        end
      end
    end
  end

endmodule
