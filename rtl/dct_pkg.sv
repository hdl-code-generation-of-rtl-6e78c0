// dct_pkg: word growth of the multiplier-free DCT blocks.
//
// Every block keeps full precision, so its output is wider than its input by
// a fixed number of bits. For an N-point transform the largest gain from one
// input word to an output is that of the DC row, 64*N (every coefficient is
// at most 64*sqrt(2) and the sum of the magnitudes of any odd row stays below
// 64*N: 84+35 = 119 < 256, 89+75+50+18 = 232 < 512), so
//   growth(N) = 6 + log2(N)   ->  dct2: 7, dct4: 8, dct8: 9 bits.
// The coefficient values themselves are not kept here: each block writes its
// constant products as explicit shifted sums, which is the point of the design.
package dct_pkg;

  // Default sample width: 16-bit signed samples.
  localparam int unsigned DEFAULT_IN_W = 16;

  // Bits added by an N-point transform (N a power of two).
  function automatic int unsigned grow(input int unsigned n_pts);
    return 6 + $clog2(n_pts);
  endfunction

endpackage
