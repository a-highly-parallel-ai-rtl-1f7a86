// tb_fp16_ref_pkg: reference float16 arithmetic for the testbenches.
//
// Works through the simulator's double-precision reals rather than bit-level
// integer logic, so it is independent of the RTL's datapath. A float16 value
// is widened to a double exactly; the sum or product of two float16 values is
// exact in a double; the double result is then rounded back to float16 by
// reading its 52-bit fraction (round to nearest, ties to even). Subnormals
// are treated as zero and tiny results flushed to zero, matching the RTL's
// stated number format. Only finite operands are handled.
package tb_fp16_ref_pkg;

  function automatic real h2r(logic [15:0] h);
    logic [63:0] d;
    if (h[14:10] == 5'd0) d = {h[15], 63'd0};
    else d = {h[15], 11'(int'(h[14:10]) - 15 + 1023), h[9:0], 42'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [15:0] r2h(real r);
    logic [63:0] d;
    int          e;
    logic [10:0] f;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 15'd0};
    e  = int'(d[62:52]) - 1023 + 15;
    if (e <= 0) return {d[63], 15'd0};
    f  = {1'b0, d[51:42]};
    g  = d[41];
    st = |d[40:0];
    if (g && (st || f[0])) f = f + 11'd1;
    if (f[10]) begin e = e + 1; f[10] = 1'b0; end
    if (e >= 31) return {d[63], 5'd31, 10'd0};
    return {d[63], 5'(e), f[9:0]};
  endfunction

  function automatic logic [15:0] ref_mul(logic [15:0] a, logic [15:0] b);
    return r2h(h2r(a) * h2r(b));
  endfunction

  function automatic logic [15:0] ref_add(logic [15:0] a, logic [15:0] b);
    return r2h(h2r(a) + h2r(b));
  endfunction

  // Random finite float16 with exponent in [emin, emax]; a few zeros.
  function automatic logic [15:0] rand_h(int emin, int emax);
    int unsigned u;
    u = $urandom;
    if (u % 16 == 0) return {u[20], 15'd0};
    return {u[31], 5'(emin + int'($urandom % unsigned'(emax - emin + 1))), u[9:0]};
  endfunction

endpackage
