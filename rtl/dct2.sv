// dct2: 2-point DCT built from a butterfly and a 6-bit left shift.
//
// The 2x2 DCT coefficient matrix is [d16 d16; d16 -d16] with d16 = 64, the
// scale at which the 4-point odd coefficients come out as 84 and 35. The
// block therefore needs no multiplier at all:
//   y0 = (a + b) <<< 6
//   y1 = (a - b) <<< 6
// It is the seed of the recursion: the even half of a 4-point DCT is a 2-point
// DCT of the sums x0+x3 and x1+x2.
//
// Interface: two signed IN_W-bit samples in, two signed (IN_W+7)-bit results
// out, full precision, so nothing can overflow. The 6 low output bits are
// always zero (both rows are pure x64); they are kept so that the even
// outputs of dct4 and dct8 share the scale of the odd ones.
// Timing: purely combinational, zero latency, one result per input set.
// The matrix and the d16 row symmetry follow the source description; the
// value 64 for d16 and the full-precision widths are this design's choices.
module dct2 #(
  parameter int unsigned IN_W = dct_pkg::DEFAULT_IN_W + 1
) (
  input  logic signed [IN_W-1:0]                    a,
  input  logic signed [IN_W-1:0]                    b,
  output logic signed [IN_W+dct_pkg::grow(2)-1:0] y0,
  output logic signed [IN_W+dct_pkg::grow(2)-1:0] y1
);

  localparam int unsigned OUT_W = IN_W + dct_pkg::grow(2);

  logic signed [OUT_W-1:0] sum, dif;

  always_comb begin
    sum = OUT_W'(a) + OUT_W'(b);
    dif = OUT_W'(a) - OUT_W'(b);
    y0  = sum <<< 6;
    y1  = dif <<< 6;
  end

endmodule
