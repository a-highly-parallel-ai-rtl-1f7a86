// tb_fp16_add: self-checking test of the float16 adder.
// Directed cases (carry out, cancellation, rounding ties, signed zeros,
// overflow, infinities) and random finite operands, both with close and with
// far-apart exponents, against the double-precision reference.
module tb_fp16_add;
  import tb_fp16_ref_pkg::*;

  logic [15:0] a, b, s;
  int checks = 0, failures = 0;

  fp16_add dut (.a(a), .b(b), .s(s));

  task automatic check(logic [15:0] x, logic [15:0] y, logic [15:0] exp_s);
    a = x; b = y;
    #1;
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h + %h = %h, expected %h", x, y, s, exp_s);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h3C00, 16'h3C00, 16'h4000);   // 1 + 1
    check(16'h4200, 16'hBC00, 16'h4000);   // 3 - 1
    check(16'h3C00, 16'hBC00, 16'h0000);   // exact cancellation -> +0
    check(16'h8000, 16'h8000, 16'h8000);   // -0 + -0
    check(16'h8000, 16'h0000, 16'h0000);   // -0 + +0
    check(16'h3C00, 16'h0C00, 16'h3C00);   // quarter ulp rounds away
    check(16'h3C00, 16'h1000, 16'h3C00);   // exactly half ulp, tie to even
    check(16'h3C01, 16'h1000, 16'h3C02);   // half ulp, tie to even (up)
    check(16'h7BFF, 16'h7BFF, 16'h7C00);   // overflow
    check(16'h7C00, 16'hFC00, 16'h7E00);   // inf - inf
    check(16'h4140, 16'h0000, 16'h4140);   // x + 0
    for (int i = 0; i < 20000; i++) begin
      logic [15:0] x, y;
      x = rand_h(1, 30);
      y = (i % 2 == 0) ? rand_h(1, 30)
                       : {$urandom_range(1, 0) == 1, x[14:10], 10'($urandom)};
      check(x, y, ref_add(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
