// fir_pkg: sizes and default coefficients shared by the block FIR filter and its top level.
//
// The filter is an 8-tap direct-form FIR that takes a block of 4 samples every clock. Samples
// are 8-bit and outputs 16-bit, as on the filter's ports (xi0..xi3[7:0], o1..o4[15:0]). The
// coefficient values are this design's own choice: the only constraint available is the steady
// state of a held input block, which fixes h[m] + h[m+4] = 1, 2, 3, 4 for m = 0..3. The default
// set below meets that with every tap non-zero and one negative tap, so all eight multipliers
// and both signs of the Booth recoding are exercised.
package fir_pkg;

  localparam int unsigned SAMPLE_W = 8;              // input sample and coefficient width
  localparam int unsigned OUT_W    = 2 * SAMPLE_W;   // product and output width
  localparam int unsigned TAPS     = 8;              // filter order + 1
  localparam int unsigned BLOCK    = 4;              // samples processed per clock

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [OUT_W-1:0]    out_t;

  // h[0] multiplies the newest sample.
  localparam sample_t DEFAULT_COEFFS [TAPS] = '{
    8'sd2, 8'sd1, 8'sd1, 8'sd2, -8'sd1, 8'sd1, 8'sd2, 8'sd2
  };

endpackage
