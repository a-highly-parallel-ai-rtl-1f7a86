// tb_conv_calc: checks one CON computing a full 28x28 channel.
// A random float16 image and kernel are applied; every pass's 14 results are
// compared with an in-order float16 reference convolution, the pass order is
// checked, and so is the timing: the first pass reports 28 edges after the
// edge that samples `start`, and each further pass 28 edges after the one
// before (27 CU cycles + 1 hand-over), 1568 edges for the channel.
module tb_conv_calc;
  import tb_fp16_ref_pkg::*;
  localparam int IMG = 32, K = 5, NCU = 14, OUT = IMG - K + 1, NSEG = OUT / NCU;

  logic clk = 0, reset = 0, start = 0;
  logic [K*K-1:0][15:0] kernel_in;
  logic [IMG*IMG-1:0][15:0] image;
  logic [NCU-1:0][15:0] results;
  logic [4:0] row;
  logic       seg;
  logic pass_valid, kernel_done, busy;
  int checks = 0, failures = 0;

  conv_calc #(.IMG(IMG), .K(K), .NCU(NCU)) dut (.clk, .reset, .start, .kernel_in, .image,
    .results, .row, .seg, .pass_valid, .kernel_done, .busy);

  always #5 clk = ~clk;
  initial #1 reset = 1;    // an edge, so asynchronous resets act

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] ref_px(int r, int c);
    logic [15:0] acc = 16'h0000;
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++)
        acc = ref_add(acc, ref_mul(kernel_in[ky*K+kx], image[(r+ky)*IMG + c + kx]));
    return acc;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int passes, edges, last_edge;
    for (int p = 0; p < IMG*IMG; p++) image[p] = rand_h(8, 16);
    for (int i = 0; i < K*K; i++) kernel_in[i] = rand_h(8, 16);
    repeat (2) @(negedge clk);
    reset = 0;
    @(negedge clk); start = 1;
    @(posedge clk);              // start sampled: edge 0
    @(negedge clk); start = 0;
    edges = 0; passes = 0; last_edge = 0;
    while (passes < OUT*NSEG) begin
      edges++;
      @(negedge clk);
      if (pass_valid) begin
        int er, es;
        er = passes / NSEG; es = passes % NSEG;
        chk(row == 5'(er) && seg == 1'(es), $sformatf("pass %0d position", passes));
        chk(edges - last_edge == 28, $sformatf("pass %0d after %0d edges", passes, edges - last_edge));
        last_edge = edges;
        for (int j = 0; j < NCU; j++) begin
          logic [15:0] m;
          m = ref_px(er, es * NCU + j);
          chk(results[j] === m, $sformatf("pixel (%0d,%0d) = %h expected %h",
                                          er, es*NCU+j, results[j], m));
        end
        chk(kernel_done == (passes == OUT*NSEG - 1), "kernel_done on last pass");
        passes++;
      end
    end
    chk(edges == 1568, $sformatf("channel took %0d edges, expected 1568", edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
