// output_controller: assembles the C1 output feature map.
//
// Each finished pass of CON c delivers NCU (14) results for kernel
// batch*NCON + c, output row `row`, columns seg*NCU .. seg*NCU+NCU-1. The
// controller writes them into the feature-map register `fmap` (NKERNEL x OUT
// x OUT float16 values, 28x28x6x16 = 75,264 bits at the default sizes) and
// counts the passes; when all NKERNEL*OUT*NSEG passes have been written it
// raises `done`, which stays high until reset. `fmap` is indexed
// [channel][row][column], so in the flat bus pixel (k,r,c) sits at bits
// ((k*OUT + r)*OUT + c)*16 +: 16.
//
// The document names this block and the output size; the register map, the
// pass counter and the sticky `done` are this design's choices.
//
// Interface: clk, reset, pass_valid, row, seg, results, batch in; fmap, done
// out. Timing: a result is in `fmap` one edge after its `pass_valid`.
module output_controller
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
  localparam int unsigned BW     = (NBATCH > 1) ? $clog2(NBATCH) : 1,
  localparam int unsigned NPASS  = NKERNEL * OUT * NSEG,
  localparam int unsigned PW     = $clog2(NPASS + 1)
) (
  input  logic                                    clk,
  input  logic                                    reset,
  input  logic  [NCON-1:0]                        pass_valid,
  input  logic  [NCON-1:0][RW-1:0]                row,
  input  logic  [NCON-1:0][SW-1:0]                seg,
  input  fp16_t [NCON-1:0][NCU-1:0]               results,
  input  logic  [BW-1:0]                          batch,
  output fp16_t [NKERNEL-1:0][OUT-1:0][OUT-1:0]   fmap,
  output logic                                    done
);

  logic [PW-1:0] passes;
  logic [PW-1:0] passes_next;

  always_comb begin
    passes_next = passes;
    for (int c = 0; c < int'(NCON); c++) begin
      if (pass_valid[c]) passes_next = passes_next + 1'b1;
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      passes <= '0;
      done   <= 1'b0;
    end else begin
      passes <= passes_next;
      if (passes_next == PW'(NPASS)) done <= 1'b1;
    end
  end

  // every map element has its own write enable: element (k, r, col) belongs
  // to CON k % NCON in batch k / NCON, row r, segment col / NCU, and takes
  // that CON's result col % NCU
  for (genvar k = 0; k < NKERNEL; k++) begin : g_ch
    for (genvar r = 0; r < OUT; r++) begin : g_row
      for (genvar col = 0; col < OUT; col++) begin : g_col
        always_ff @(posedge clk or posedge reset) begin
          if (reset) begin
            fmap[k][r][col] <= FP16_PZERO;
          end else if (pass_valid[k % NCON] && (batch == BW'(k / NCON)) &&
                       (row[k % NCON] == RW'(r)) && (seg[k % NCON] == SW'(col / NCU))) begin
            fmap[k][r][col] <= results[k % NCON][col % NCU];
          end
        end
      end
    end
  end

endmodule
