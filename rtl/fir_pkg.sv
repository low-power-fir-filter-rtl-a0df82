// fir_pkg -- sizes and coefficients of the low-pass FIR filter.
//
// The filter is a 26-tap equiripple low-pass design for a 48 kHz sample rate
// with a 10 kHz pass-band edge and a 12 kHz stop-band edge. Its coefficients
// are 16-bit two's-complement numbers and form a symmetric (linear-phase)
// set; they sum to 61846, about 0.94 x 2^16, so an accumulator shifted right by
// 16 bits gives a DC gain of about 0.94 (about 1.02 at 5 kHz and below
// 0.06, i.e. -25 dB, from 12 kHz up).
//
// The specification and the coefficient values follow the published design. The
// widths derived from them (product and accumulator) are this design's.
package fir_pkg;
  localparam int unsigned TAPS   = 26;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned COEF_W = 16;
  localparam int unsigned PROD_W = DATA_W + COEF_W;
  // Enough headroom for the sum of TAPS full-scale products.
  localparam int unsigned ACC_W  = PROD_W + $clog2(TAPS);

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // c0 .. c25, c0 first.
  localparam coef_t COEFS [TAPS] = '{
    16'hFBF5, 16'hF780, 16'h0526, 16'h0512, 16'hFDD5, 16'hF6D0, 16'h00CD,
    16'h0D87, 16'h0355, 16'hEAB3, 16'hF1DB, 16'h2CE4, 16'h6B5E, 16'h6B5E,
    16'h2CE4, 16'hF1DB, 16'hEAB3, 16'h0355, 16'h0D87, 16'h00CD, 16'hF6D0,
    16'hFDD5, 16'h0512, 16'h0526, 16'hF780, 16'hFBF5
  };
endpackage
