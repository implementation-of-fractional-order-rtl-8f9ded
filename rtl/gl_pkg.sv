// gl_pkg: number formats shared by the Grunwald-Letnikov fractional
// differintegral operator.
//
// All words are two's-complement fixed point.
//   data_t  Q7.17, 24 bits: input samples, gamma, ln(T) and the output, in
//           volts. Range +-64 with a step of 2^-17 (about 7.63e-6). This is
//           the word the operator is specified with.
//   coef_t  Q4.28, 32 bits: the binomial weights b_j. |b_j| <= 1 whenever
//           gamma >= -1; the extra headroom and precision are a choice of
//           this design, so that the small weights of a long window keep
//           their resolution.
//   wide_t  Q20.28, 48 bits: the exponent argument, e^x and the scale factor
//           T^-gamma, which reaches e^10 = 22026.
// The window length L is a module parameter, not a package constant.
package gl_pkg;

  localparam int unsigned DATA_W = 24;
  localparam int unsigned DATA_F = 17;
  localparam int unsigned COEF_W = 32;
  localparam int unsigned COEF_F = 28;
  localparam int unsigned WIDE_W = 48;
  localparam int unsigned WIDE_F = 28;
  localparam int unsigned ADC_W  = 16;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [WIDE_W-1:0] wide_t;
  typedef logic signed [ADC_W-1:0]  adc_t;

  localparam data_t DATA_MAX = data_t'({1'b0, {(DATA_W-1){1'b1}}});
  localparam data_t DATA_MIN = data_t'({1'b1, {(DATA_W-1){1'b0}}});
  localparam coef_t COEF_ONE = coef_t'(64'sd1 <<< COEF_F);
  localparam coef_t COEF_MAX = coef_t'({1'b0, {(COEF_W-1){1'b1}}});
  localparam coef_t COEF_MIN = coef_t'({1'b1, {(COEF_W-1){1'b0}}});
  localparam wide_t WIDE_ONE = wide_t'(64'sd1 <<< WIDE_F);

  // Multiply two wide_t values and return the result in wide_t, rounded to
  // nearest. The caller keeps the operands small enough not to overflow.
  function automatic wide_t wide_mul(input wide_t a, input wide_t b);
    logic signed [2*WIDE_W-1:0] p;
    p = a * b;
    p = p + (2*WIDE_W)'(64'sd1 <<< (WIDE_F - 1));
    return wide_t'(p >>> WIDE_F);
  endfunction

endpackage
