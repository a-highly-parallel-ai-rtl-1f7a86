// tb_conv_rf: checks the RF's pass sequence and window selection.
// A model CU answers each cu_start with done after a random delay. For every
// pass the testbench checks the row/segment order, that every window equals
// the image pixels under the kernel at that position (the image holds each
// pixel's own index, so positions are easy to tell apart), the number of
// passes, and that kernel_done comes with the last one. Runs twice.
module tb_conv_rf;
  localparam int IMG = 32, K = 5, NCU = 14, OUT = IMG - K + 1, NSEG = OUT / NCU;

  logic clk = 0, reset = 0, start = 0, cu_done = 0;
  logic [IMG*IMG-1:0][15:0] image;
  logic cu_start, pass_valid, kernel_done, busy;
  logic [NCU-1:0][K*K-1:0][15:0] windows;
  logic [4:0] row;
  logic       seg;
  int checks = 0, failures = 0;

  conv_rf #(.IMG(IMG), .K(K), .NCU(NCU)) dut (.clk, .reset, .start, .image, .cu_done,
    .cu_start, .windows, .row, .seg, .pass_valid, .kernel_done, .busy);

  always #5 clk = ~clk;
  initial #1 reset = 1;    // an edge, so asynchronous resets act

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // model CU: done goes high some cycles after start, low on the next start
  int delay;
  always @(posedge clk) begin
    if (cu_start) begin
      cu_done <= 0;
      delay   <= 2 + int'($urandom % 5);
    end else if (delay > 0) begin
      delay <= delay - 1;
      if (delay == 1) cu_done <= 1;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < IMG*IMG; p++) image[p] = 16'(p);
    delay = 0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int run = 0; run < 2; run++) begin
      int passes;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      passes = 0;
      while (passes < OUT*NSEG) begin
        @(negedge clk);
        if (pass_valid) begin
          bit ok;
          int er, es;
          er = passes / NSEG; es = passes % NSEG;
          chk(row == 5'(er) && seg == 1'(es), $sformatf("pass %0d at row %0d seg %0d", passes, row, seg));
          ok = 1;
          for (int j = 0; j < NCU; j++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++)
                if (windows[j][ky*K+kx] !== 16'((er + ky) * IMG + es * NCU + j + kx)) ok = 0;
          chk(ok, $sformatf("windows of pass %0d", passes));
          chk(kernel_done == (passes == OUT*NSEG - 1), "kernel_done on last pass only");
          chk(cu_start == (passes != OUT*NSEG - 1), "next pass started at once");
          passes++;
        end
      end
      @(negedge clk);
      chk(!busy, "idle after last pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
