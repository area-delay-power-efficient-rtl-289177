// fir2d_pkg: default sizes of the block-based
// non-separable 2D FIR filter.
//
// The defaults are the configuration the filter is built for: an M x M = 512 x 512
// image, blocks of L = 4 samples, an N x N = 8 x 8 impulse response, B = 8-bit
// samples and coefficients and D = 16-bit intermediate signals. P = M/L = 128 is
// the number of blocks in one image row and therefore the depth of every shift
// register in the row memory.
package fir2d_pkg;

  parameter int unsigned IMG_M  = 512;  // image is IMG_M x IMG_M samples
  parameter int unsigned BLK_L  = 4;    // samples per input block
  parameter int unsigned TAPS_N = 8;    // filter is TAPS_N x TAPS_N
  parameter int unsigned SAMP_B = 8;    // sample and coefficient width
  parameter int unsigned DATA_D = 16;   // intermediate (product, sum, output) width

endpackage
