// fp16_pkg: types and constants shared by the LeNet-5 C1 + ReLU accelerator.
//
// All data in the accelerator (image pixels, kernel weights, partial sums and
// feature-map values) is IEEE 754 binary16 ("float16"): 1 sign bit, 5 exponent
// bits with bias 15 and 10 fraction bits. The packed struct below names those
// fields. The layer geometry constants are the LeNet-5 C1 sizes: a 32x32x1
// input, six 5x5 kernels, stride 1, no padding, hence a 28x28x6 output.
package fp16_pkg;

  typedef logic [15:0] fp16_t;

  typedef struct packed {
    logic       sign;
    logic [4:0] exp;
    logic [9:0] frac;
  } fp16_fields_t;

  localparam int unsigned FP16_W    = 16;
  localparam int unsigned FP16_BIAS = 15;
  localparam fp16_t       FP16_PZERO = 16'h0000;
  localparam fp16_t       FP16_QNAN  = 16'h7E00;

  // LeNet-5 C1 geometry
  localparam int unsigned C1_IMG      = 32;  // input side
  localparam int unsigned C1_K        = 5;   // kernel side
  localparam int unsigned C1_NKERNEL  = 6;   // kernels / output channels
  localparam int unsigned C1_NCON     = 3;   // convolution calculation modules
  localparam int unsigned C1_NCU      = 14;  // CUs per calculation module
  localparam int unsigned CU_RST_CYC  = 2;   // reset-delay cycles per window

  // ReLU of one float16 value: zero when the sign bit is set, else unchanged.
  function automatic fp16_t relu16(fp16_t x);
    return x[15] ? FP16_PZERO : x;
  endfunction

endpackage
