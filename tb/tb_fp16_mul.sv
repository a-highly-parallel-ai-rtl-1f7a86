// tb_fp16_mul: self-checking test of the float16 multiplier.
// Directed cases (exact products, rounding ties, overflow, underflow,
// infinities, NaN) and random finite operands against the double-precision
// reference in tb_fp16_ref_pkg.
module tb_fp16_mul;
  import tb_fp16_ref_pkg::*;

  logic [15:0] a, b, p;
  int checks = 0, failures = 0;

  fp16_mul dut (.a(a), .b(b), .p(p));

  task automatic check(logic [15:0] x, logic [15:0] y, logic [15:0] exp_p);
    a = x; b = y;
    #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("MISMATCH %h * %h = %h, expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h3C00, 16'h3C00, 16'h3C00);   // 1 * 1
    check(16'h4000, 16'h4200, 16'h4600);   // 2 * 3 = 6
    check(16'hC000, 16'h3800, 16'hBC00);   // -2 * 0.5
    check(16'h3C01, 16'h3C01, 16'h3C02);   // (1+u)^2 rounds to 1+2u
    check(16'h7BFF, 16'h4000, 16'h7C00);   // overflow -> inf
    check(16'h0400, 16'h3800, 16'h0000);   // underflow -> 0
    check(16'h7C00, 16'h3C00, 16'h7C00);   // inf * 1
    check(16'h7C00, 16'h0000, 16'h7E00);   // inf * 0 -> NaN
    check(16'h8000, 16'h4000, 16'h8000);   // -0 * 2
    for (int i = 0; i < 20000; i++) begin
      logic [15:0] x, y;
      x = rand_h(1, 30);
      y = rand_h(1, 30);
      check(x, y, ref_mul(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
