// processing_element16: float16 multiply-accumulate unit of one CU.
//
// One float16 multiplier feeding one float16 adder whose other input is the
// accumulator register: every clock cycle with `acc_en` high the register
// takes acc + a*b. The product is rounded to float16 before the addition
// (two roundings, no fused multiply-add). `clr` zeroes the accumulator and has
// priority over `acc_en`; the conv_unit holds it during its reset-delay
// cycles. The document says this element holds float16 multiplication and
// addition units performing multiply-accumulate; the registered accumulator,
// the clear input and the asynchronous active-high reset are this design's
// choices.
//
// Interface: clk, reset (async, active high), clr, acc_en, a (weight),
// b (pixel), acc (accumulator). Timing: one MAC per cycle, result in `acc`
// after the clock edge.
module processing_element16
  import fp16_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  clr,
  input  logic  acc_en,
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t acc
);

  fp16_t prod, sum;

  fp16_mul u_mul (.a(a),   .b(b),    .p(prod));
  fp16_add u_add (.a(acc), .b(prod), .s(sum));

  always_ff @(posedge clk or posedge reset) begin
    if (reset)       acc <= FP16_PZERO;
    else if (clr)    acc <= FP16_PZERO;
    else if (acc_en) acc <= sum;
  end

endmodule
