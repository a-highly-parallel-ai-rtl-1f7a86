// tb_gated_clock_relu: checks one ReLU channel.
// Random float16 inputs (both signs, zeros) with random enable. After every
// enabled edge OutputFinal must be the input with negatives replaced by 0;
// after a disabled edge it must hold. Finished must be high after an enabled
// edge while the input stays the same, and drop as soon as the input
// changes. Reset must clear the output and Finished.
module tb_gated_clock_relu;
  logic clk = 0, enable = 0, reset = 0;
  logic [15:0] x = 0, OutputFinal;
  logic Finished;
  int checks = 0, failures = 0;

  gated_clock_relu dut (.clk, .enable, .reset, .x, .OutputFinal, .Finished);

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
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] expect_out;
    bit produced;
    repeat (2) @(negedge clk);
    chk(OutputFinal == 0 && !Finished, "reset state");
    reset = 0;
    expect_out = 0; produced = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] nx;
      @(negedge clk);
      enable = ($urandom % 4 != 0);
      nx = ($urandom % 5 == 0) ? x : 16'($urandom);
      if ($urandom % 8 == 0) nx = {1'($urandom), 15'd0};
      x = nx;
      #1;
      if (produced && enable) chk(Finished == 0 || x == dut.x_seen, "Finished drops on new input");
      @(posedge clk); #1;
      if (enable) begin
        expect_out = x[15] ? 16'h0000 : x;
        produced = 1;
      end
      chk(OutputFinal === expect_out, $sformatf("i %0d t %0t out %h expected %h (x %h en %0d)", i, $time,
                                                OutputFinal, expect_out, x, enable));
      if (enable) chk(Finished, "Finished after an enabled edge");
      // change the input mid-cycle: Finished must drop at once
      if (i % 7 == 0 && enable) begin
        #2 x = x ^ 16'h0001;
        #1 chk(!Finished, "Finished drops when the input changes");
      end
    end
    @(negedge clk); reset = 1;
    #1 chk(OutputFinal == 0 && !Finished, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
