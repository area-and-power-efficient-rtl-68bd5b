// dct_pkg: word width and word type shared by the approximate DCT datapath.
//
// Every adder of the datapath is a DATA_W-bit two's complement ripple carry
// adder, so all samples, partial sums and coefficients travel as word_t.
// The 16-bit width follows the 16-bit ripple carry adders the design is built
// from; it holds the worst-case growth of the 16-point 2D transform of 8-bit
// pixels (gain 8 per 1D pass, 255 * 64 = 16320 < 2**15).
package dct_pkg;

  parameter int unsigned DATA_W = 16;

  typedef logic signed [DATA_W-1:0] word_t;

endpackage
