// tb_processing_element16: checks the float16 multiply-accumulate element.
// Runs random sequences of clear / accumulate / hold cycles and compares the
// accumulator every cycle with a reference accumulation done in reals.
module tb_processing_element16;
  import tb_fp16_ref_pkg::*;

  logic clk = 0, reset = 0, clr = 0, acc_en = 0;
  logic [15:0] a = 0, b = 0, acc;
  logic [15:0] model = 0;
  int checks = 0, failures = 0;

  processing_element16 dut (.clk, .reset, .clr, .acc_en, .a, .b, .acc);

  always #5 clk = ~clk;
  initial #1 reset = 1;    // an edge, so asynchronous resets act

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    for (int i = 0; i < 3000; i++) begin
      int unsigned r;
      @(negedge clk);
      r = $urandom % 16;
      clr    = (r == 0);
      acc_en = (r > 2);
      a = rand_h(10, 18);
      b = rand_h(10, 18);
      if (clr) model = 16'h0000;
      else if (acc_en) model = ref_add(model, ref_mul(a, b));
      @(posedge clk); #1;
      checks++;
      if (acc !== model) begin
        failures++;
        if (failures < 10) $display("MISMATCH cycle %0d acc=%h expected %h", i, acc, model);
        model = acc;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
