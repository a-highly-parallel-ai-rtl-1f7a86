// tb_conv_unit: checks one CU on random 5x5 windows.
// For every window the result must equal the in-order float16
// multiply-accumulate of the 25 pairs, `done` must rise exactly 27 clock
// edges (2 clear + 25 MAC) after the edge that samples `start`, and `busy`
// must be high in between. Starts are given both from IDLE and from DONE.
module tb_conv_unit;
  import tb_fp16_ref_pkg::*;

  logic clk = 0, reset = 0, start = 0;
  logic [24:0][15:0] filter, window;
  logic [15:0] result;
  logic done, busy;
  int checks = 0, failures = 0;

  conv_unit dut (.clk, .reset, .start, .filter, .window, .result, .done, .busy);

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    filter = '0; window = '0;
    repeat (2) @(negedge clk);
    reset = 0;
    for (int w = 0; w < 200; w++) begin
      logic [15:0] model;
      int cycles;
      for (int i = 0; i < 25; i++) begin
        filter[i] = rand_h(10, 16);
        window[i] = rand_h(10, 16);
      end
      model = 16'h0000;
      for (int i = 0; i < 25; i++) model = ref_add(model, ref_mul(filter[i], window[i]));
      @(negedge clk);
      start = 1;
      @(posedge clk);          // start sampled here
      @(negedge clk);
      start = 0;
      cycles = 0;
      while (!done && cycles < 100) begin
        chk(busy, "busy while computing");
        @(negedge clk);
        cycles++;
      end
      chk(cycles == 27, $sformatf("latency %0d, expected 27", cycles));
      chk(result === model, $sformatf("window %0d result %h expected %h", w, result, model));
      // sometimes idle a few cycles, sometimes restart straight from DONE
      if (w % 3 == 0) repeat (3) @(negedge clk);
      chk(done && !busy, "done holds until next start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
