// fp16_add: combinational IEEE 754 binary16 adder.
//
// The addition unit of the processing element. The operand of larger
// magnitude is kept as is; the other significand is shifted right by the
// exponent difference into a 24-bit field (11 significand bits plus 13 extra
// bits, the last one collecting every bit shifted past it as a sticky bit).
// The aligned significands are added or subtracted, the result is
// renormalised with a leading-one search and rounded to nearest, ties to
// even. As in fp16_mul, subnormal inputs count as zero, results below the
// normal range are flushed to zero, overflow gives infinity, and a NaN input
// or +inf plus -inf gives the quiet NaN 7E00. An exact cancellation gives +0;
// the sum of two zeros is -0 only if both are negative. The document only
// names the float16 adder; rounding and subnormal handling are this design's
// choices.
//
// Interface: a, b in; s out. Timing: purely combinational, no clock.
module fp16_add
  import fp16_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t s
);

  fp16_fields_t fa, fb, big, sml;
  logic         a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [4:0]   ediff;
  logic [23:0]  m_big, m_sml, m_shift;
  logic [24:0]  sum;
  logic         sticky_in;
  int unsigned  lead;          // position of the leading one in sum
  logic [22:0]  norm;          // sum shifted so the leading one is just above bit 22
  logic signed [7:0] e_pre, e_fin;
  logic [9:0]   frac;
  logic         guard, sticky, rnd_up;
  logic [10:0]  frac_r;

  always_comb begin
    fa = a;
    fb = b;
    a_zero = (fa.exp == 5'd0);
    b_zero = (fb.exp == 5'd0);
    a_inf  = (fa.exp == 5'd31) && (fa.frac == 10'd0);
    b_inf  = (fb.exp == 5'd31) && (fb.frac == 10'd0);
    a_nan  = (fa.exp == 5'd31) && (fa.frac != 10'd0);
    b_nan  = (fb.exp == 5'd31) && (fb.frac != 10'd0);

    // order by magnitude
    if ({fa.exp, fa.frac} >= {fb.exp, fb.frac}) begin
      big = fa; sml = fb;
    end else begin
      big = fb; sml = fa;
    end
    ediff = big.exp - sml.exp;

    m_big = {1'b1, big.frac, 13'd0};
    m_sml = {1'b1, sml.frac, 13'd0};
    // align; everything shifted out of the field is folded into bit 0
    m_shift   = m_sml >> ediff;
    sticky_in = 1'b0;
    for (int i = 0; i < 24; i++) begin
      if (i < int'(ediff) && m_sml[i]) sticky_in = 1'b1;
    end
    m_shift[0] = m_shift[0] | sticky_in;

    if (big.sign == sml.sign) sum = {1'b0, m_big} + {1'b0, m_shift};
    else                      sum = {1'b0, m_big} - {1'b0, m_shift};

    lead = 0;
    for (int i = 0; i < 25; i++) begin
      if (sum[i]) lead = i;
    end

    e_pre = $signed({3'b000, big.exp}) + $signed(8'(lead)) - 8'sd23;
    if (lead == 24) norm = sum[23:1];
    else            norm = 23'(sum << (23 - lead));
    frac   = norm[22:13];
    guard  = norm[12];
    sticky = (|norm[11:0]) | ((lead == 24) && sum[0]);
    rnd_up = guard & (sticky | frac[0]);
    frac_r = {1'b0, frac} + {10'd0, rnd_up};
    e_fin  = e_pre + (frac_r[10] ? 8'sd1 : 8'sd0);

    if (a_nan || b_nan || (a_inf && b_inf && (fa.sign != fb.sign))) begin
      s = FP16_QNAN;
    end else if (a_inf) begin
      s = a;
    end else if (b_inf) begin
      s = b;
    end else if (a_zero && b_zero) begin
      s = {fa.sign & fb.sign, 15'd0};
    end else if (a_zero) begin
      s = b;
    end else if (b_zero) begin
      s = a;
    end else if (sum == 25'd0) begin
      s = FP16_PZERO;
    end else if (e_pre <= 8'sd0) begin
      s = {big.sign, 15'd0};
    end else if (e_fin >= 8'sd31) begin
      s = {big.sign, 5'd31, 10'd0};
    end else begin
      s = {big.sign, e_fin[4:0], frac_r[9:0]};
    end
  end

endmodule
