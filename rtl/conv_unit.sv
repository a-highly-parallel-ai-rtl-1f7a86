// conv_unit (CU): computes one KxK convolution window, one product per cycle.
//
// The CU receives the whole kernel (`filter`, 25 float16 values, 400 bits)
// and the image window under it (`window`, 400 bits) in parallel, and walks
// through the 25 element pairs sequentially with a single
// processing_element16, trading time for area as the document describes. A
// small state machine sequences the work: after `start` it spends RST_CYC
// (2) cycles clearing the accumulator (the document's "reset delay") and then
// K*K (25) cycles accumulating filter[i]*window[i] for i = 0..24 in order,
// 27 cycles in all. It then sits in DONE with `done` high and `result`
// stable until the next `start`. Element i is kernel row i/K, column i%K.
//
// The 25 + 2 cycle count follows the document; the state encoding, the
// start/done handshake (start may be given in IDLE or DONE) and the element
// order are this design's choices.
//
// Interface: clk, reset (async, active high), start, filter, window; result,
// done, busy. Timing: `done` rises RST_CYC + K*K clock edges after the edge
// that samples `start`.
module conv_unit
  import fp16_pkg::*;
#(
  parameter int unsigned K       = C1_K,
  parameter int unsigned RST_CYC = CU_RST_CYC
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  start,
  input  fp16_t [K*K-1:0]       filter,
  input  fp16_t [K*K-1:0]       window,
  output fp16_t                 result,
  output logic                  done,
  output logic                  busy
);

  localparam int unsigned NTAP = K * K;
  localparam int unsigned CW   = $clog2(NTAP + RST_CYC + 1);

  typedef enum logic [1:0] {CU_IDLE, CU_CLEAR, CU_MAC, CU_DONE} cu_state_t;

  cu_state_t       state;
  logic [CW-1:0]   cnt;
  fp16_t           a_sel, b_sel;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= CU_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        CU_IDLE, CU_DONE: begin
          if (start) begin
            state <= CU_CLEAR;
            cnt   <= '0;
          end
        end
        CU_CLEAR: begin
          if (cnt == CW'(RST_CYC - 1)) begin
            state <= CU_MAC;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        CU_MAC: begin
          if (cnt == CW'(NTAP - 1)) begin
            state <= CU_DONE;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= CU_IDLE;
      endcase
    end
  end

  always_comb begin
    a_sel = filter[0];
    b_sel = window[0];
    for (int i = 0; i < int'(NTAP); i++) begin
      if (cnt == CW'(i)) begin
        a_sel = filter[i];
        b_sel = window[i];
      end
    end
  end

  processing_element16 u_pe (
    .clk    (clk),
    .reset  (reset),
    .clr    (state == CU_CLEAR),
    .acc_en (state == CU_MAC),
    .a      (a_sel),
    .b      (b_sel),
    .acc    (result)
  );

  assign done = (state == CU_DONE);
  assign busy = (state == CU_CLEAR) || (state == CU_MAC);

  // start is only meaningful while the unit is not busy
  a_start_when_free: assert property (@(posedge clk) disable iff (reset)
    start |-> !busy);

endmodule
