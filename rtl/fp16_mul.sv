// fp16_mul: combinational IEEE 754 binary16 multiplier.
//
// The multiplication unit of the processing element. The two 11-bit
// significands (hidden one included) are multiplied into a 22-bit product,
// the product is normalised by at most one position, and the 10-bit fraction
// is rounded to nearest, ties to even, using a guard bit and a sticky bit.
// Subnormal inputs are read as zero and results below the normal range are
// flushed to a signed zero; overflow gives a signed infinity; a NaN input or
// infinity times zero gives the quiet NaN 7E00. The document only states that
// the processing element contains float16 multipliers; the rounding mode and
// the flush-to-zero treatment of subnormals are this design's choices.
//
// Interface: a, b in; p out. Timing: purely combinational, no clock.
module fp16_mul
  import fp16_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t p
);

  fp16_fields_t fa, fb;
  logic         s;
  logic         a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [21:0]  prod;
  logic [9:0]   frac;
  logic         guard, sticky, rnd_up;
  logic [10:0]  frac_r;       // fraction after rounding, with carry out
  logic signed [7:0] e_pre;   // biased exponent before rounding
  logic signed [7:0] e_fin;

  always_comb begin
    fa = a;
    fb = b;
    s  = fa.sign ^ fb.sign;
    a_zero = (fa.exp == 5'd0);
    b_zero = (fb.exp == 5'd0);
    a_inf  = (fa.exp == 5'd31) && (fa.frac == 10'd0);
    b_inf  = (fb.exp == 5'd31) && (fb.frac == 10'd0);
    a_nan  = (fa.exp == 5'd31) && (fa.frac != 10'd0);
    b_nan  = (fb.exp == 5'd31) && (fb.frac != 10'd0);

    prod  = {1'b1, fa.frac} * {1'b1, fb.frac};
    e_pre = $signed({3'b000, fa.exp}) + $signed({3'b000, fb.exp}) - 8'sd15;
    if (prod[21]) begin
      e_pre  = e_pre + 8'sd1;
      frac   = prod[20:11];
      guard  = prod[10];
      sticky = |prod[9:0];
    end else begin
      frac   = prod[19:10];
      guard  = prod[9];
      sticky = |prod[8:0];
    end
    rnd_up = guard & (sticky | frac[0]);
    frac_r = {1'b0, frac} + {10'd0, rnd_up};
    e_fin  = e_pre + (frac_r[10] ? 8'sd1 : 8'sd0);

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      p = FP16_QNAN;
    end else if (a_inf || b_inf) begin
      p = {s, 5'd31, 10'd0};
    end else if (a_zero || b_zero || e_pre <= 8'sd0) begin
      p = {s, 15'd0};
    end else if (e_fin >= 8'sd31) begin
      p = {s, 5'd31, 10'd0};
    end else begin
      p = {s, e_fin[4:0], frac_r[9:0]};
    end
  end

endmodule
