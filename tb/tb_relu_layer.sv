// tb_relu_layer: checks the six-channel ReLU layer.
// First replays the printed vectors of the layer's reference waveform
// (mixed signs, repeated values, all zeros), then runs random inputs with a
// random enable. After an enabled edge Output must be the channel-wise ReLU
// of the input, one cycle after it was applied, and Finished must be high;
// with enable low Output must hold and Finished must be low.
module tb_relu_layer;
  logic clk = 0, reset = 0, enable = 0;
  logic [95:0] x_input = '0, Output;
  logic Finished;
  int checks = 0, failures = 0;

  relu_layer dut (.clk, .reset, .enable, .x_input, .Output, .Finished);

  always #5 clk = ~clk;
  initial #1 reset = 1;    // an edge, so asynchronous resets act

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [95:0] relu6(logic [95:0] v);
    for (int c = 0; c < 6; c++) if (v[16*c + 15]) v[16*c +: 16] = 16'h0000;
    return v;
  endfunction

  logic [95:0] expect_out = '0;

  task automatic step(logic [95:0] v, bit en);
    @(negedge clk);
    x_input = v;
    enable  = en;
    @(posedge clk); #1;
    if (en) expect_out = relu6(v);
    chk(Output === expect_out, $sformatf("Output %h expected %h", Output, expect_out));
    chk(Finished == en, $sformatf("Finished %0d with enable %0d", Finished, en));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    // vectors printed in the reference waveform
    step(96'h0, 1);
    step(96'h4140BFC042000000B4CD38CD, 1);
    chk(Output == 96'h41400000420000000000_38CD, "printed vector 1");
    step(96'h3C003C003C003C003C003C00, 0);                     // disabled: hold
    chk(Output == 96'h41400000420000000000_38CD, "output held while disabled");
    step(96'h3C003C003C003C003C003C00, 1);
    step(96'h0, 1);
    step(96'h3C00B4CD0000420038CD4140, 1);
    chk(Output == 96'h3C0000000000420038CD4140, "printed vector 2");
    step(96'h38CD38CD38CD38CD38CD38CD, 1);
    chk(Output == 96'h38CD38CD38CD38CD38CD38CD, "printed vector 3");
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      logic [95:0] v;
      for (int c = 0; c < 3; c++) v[32*c +: 32] = $urandom;
      step(v, $urandom % 3 != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
