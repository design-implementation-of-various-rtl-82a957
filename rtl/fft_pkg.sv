// fft_pkg: constants shared by the 8-point FFT and its multiplier.
//
// Fixed-point convention: samples and twiddle factors are integers obtained by
// multiplying the real value by a power-of-ten scaling factor K. The default
// scaling factor is 10000, and the twiddle magnitude cos(pi/4) = 0.70710678...
// is carried with four decimal places as 7071. Both are run-time inputs of the
// FFT; the values below are the defaults used by the testbenches. The word
// widths are this design's choice.
package fft_pkg;
  // Number of points of the transform (radix-2, three butterfly stages).
  localparam int FFT_N = 8;
  // Default widths of a sample and of a coefficient (K or WR).
  localparam int DATA_W_DEF = 16;
  localparam int COEF_W_DEF = 16;
  // Default scaling factor and twiddle magnitude round(K*cos(pi/4)).
  localparam int K_SCALE_DEF = 10000;
  localparam int WR_DEF      = 7071;
endpackage
