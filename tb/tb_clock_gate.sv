// tb_clock_gate: checks the enable-gated clock.
// With a random enable applied while the clock is low, the gated clock must
// pulse exactly on the clock cycles whose enable was high. An enable change
// in the middle of a high clock phase must not cut or create a pulse.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, expected = 0;

  clock_gate dut (.clk, .en, .gclk);

  always #5 clk = ~clk;
  always @(posedge gclk) pulses++;

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
    for (int i = 0; i < 1000; i++) begin
      bit e;
      @(negedge clk);
      chk(gclk == 0, "gated clock low while clock low");
      e = 1'($urandom);
      en = e;
      if (e) expected++;
      @(posedge clk); #1;
      chk(gclk == e, "gated clock follows enable");
      if (i % 4 == 0) begin
        #2 en = ~e;       // change while the clock is high
        #1 chk(gclk == e, "no glitch on enable change while clock high");
      end
    end
    @(negedge clk);
    chk(pulses == expected, $sformatf("%0d gated pulses, expected %0d", pulses, expected));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
