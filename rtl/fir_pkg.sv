// fir_pkg: sizes and default coefficients shared by the FIR filter and its
// testbenches.
//
// The filter takes 8-bit signed samples and produces 16-bit signed results,
// and has four taps, as in the four-multiplier direct-form structure it
// implements. The coefficient width and the coefficient values themselves are
// this design's own choice: the taps are a symmetric low-pass set
// {-8, 72, 72, -8} whose absolute values add to 160, so that the worst-case
// output, 128 * 160 = 20480, fits the 16-bit signed result without wrapping.
package fir_pkg;
  localparam int unsigned DATA_W = 8;   // input sample width, filter_in[7:0]
  localparam int unsigned COEF_W = 8;   // coefficient width (own choice)
  localparam int unsigned OUT_W  = 16;  // output sample width, filter_out[15:0]
  localparam int unsigned TAPS   = 4;   // taps a(0)..a(3)

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [OUT_W-1:0]  acc_t;

  // Default impulse response a(0)..a(3).
  localparam coef_t DEFAULT_COEF [TAPS] = '{-8'sd8, 8'sd72, 8'sd72, -8'sd8};
endpackage
