// tb_input_selector: checks kernel batching and switching.
// Model CONs finish their kernels after random delays, in random order. The
// testbench checks that con_start pulses once per batch, that CON c gets
// kernel batch*3 + c, that the image passes through unchanged, that the next
// batch starts only after all three CONs finished, and that all_done pulses
// once, after the last batch. Two complete runs.
module tb_input_selector;
  localparam int IMG = 32, K = 5, NK = 6, NCON = 3;

  logic clk = 0, reset = 0, go = 0;
  logic [NK-1:0][K*K-1:0][15:0] filters;
  logic [IMG*IMG-1:0][15:0] image;
  logic [NCON-1:0] kernel_done = '0, con_start;
  logic [NCON-1:0][K*K-1:0][15:0] con_kernel;
  logic [IMG*IMG-1:0][15:0] con_image;
  logic batch;
  logic all_done;
  int checks = 0, failures = 0;
  int all_done_count = 0;

  input_selector #(.IMG(IMG), .K(K), .NKERNEL(NK), .NCON(NCON)) dut (.clk, .reset, .go,
    .filters, .image, .kernel_done, .con_start, .con_kernel, .con_image, .batch, .all_done);

  always #5 clk = ~clk;
  initial #1 reset = 1;    // an edge, so asynchronous resets act

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NK; k++)
      for (int i = 0; i < K*K; i++) filters[k][i] = 16'($urandom);
    for (int p = 0; p < IMG*IMG; p++) image[p] = 16'($urandom);
    repeat (2) @(negedge clk);
    reset = 0;
    for (int run = 0; run < 2; run++) begin
      int starts;
      @(negedge clk); go = 1;
      @(negedge clk); go = 0;
      starts = 0;
      for (int b = 0; b < NK / NCON; b++) begin
        int delay[NCON];
        int t, maxd;
        // wait for the batch start
        t = 0;
        while (con_start == '0 && t < 20) begin @(negedge clk); t++; end
        chk(con_start == '1, $sformatf("batch %0d started", b));
        chk(batch == 1'(b), "batch index");
        for (int c = 0; c < NCON; c++)
          chk(con_kernel[c] == filters[b*NCON + c], $sformatf("batch %0d CON %0d kernel", b, c));
        chk(con_image == image, "image passed through");
        starts++;
        maxd = 0;
        for (int c = 0; c < NCON; c++) begin
          delay[c] = 1 + int'($urandom % 10);
          if (delay[c] > maxd) maxd = delay[c];
        end
        // CONs finish one by one, in random order
        for (t = 1; t <= maxd; t++) begin
          @(negedge clk);
          chk(con_start == '0, "no start while the batch runs");
          chk(!all_done, "no all_done while the batch runs");
          for (int c = 0; c < NCON; c++) kernel_done[c] = (delay[c] == t);
        end
        @(negedge clk);
        kernel_done = '0;
      end
      chk(starts == NK / NCON, "number of batches");
    end
    repeat (2) @(negedge clk);
    chk(all_done_count == 2, $sformatf("all_done pulsed %0d times in 2 runs", all_done_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // all_done must come exactly once per run, together with the last kernel_done
  always @(posedge clk) if (all_done) begin
    all_done_count <= all_done_count + 1;
    checks++;
    if (batch != 1'b1 || kernel_done == '0) begin
      failures++;
      $display("FAIL all_done at the wrong time");
    end
  end
endmodule
