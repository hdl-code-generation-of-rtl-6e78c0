// dct8: 8-point 1D DCT without multipliers, built from the 4-point one.
//
// The 8-point matrix splits by row symmetry just like the 4-point one. An
// input butterfly forms the sums s_k = x_k + x_(7-k); the even rows of the
// 8-point matrix are exactly the 4-point DCT of s_0..s_3, so a dct4 gives
// Y0, Y2, Y4, Y6. The odd rows act on the differences and come from
// dct8_odd. This is the recursion by which each larger matrix is made of the
// next smaller one: dct8 -> dct4 -> dct2. Outputs are in natural order Y0..Y7
// and unscaled, like dct4.
//
// The recursion follows the source design; its exact adder structure for
// the 8-point case is not given, so this plain butterfly form is this
// design's choice.
//
// Interface: x[0..7] signed IN_W-bit; y[0..7] signed (IN_W+9)-bit.
// Timing: purely combinational, zero latency.
module dct8 #(
  parameter int unsigned IN_W = dct_pkg::DEFAULT_IN_W
) (
  input  logic signed [IN_W-1:0]                    x [8],
  output logic signed [IN_W+dct_pkg::grow(8)-1:0] y [8]
);

  localparam int unsigned OUT_W = IN_W + dct_pkg::grow(8);
  localparam int unsigned SUM_W = IN_W + 1;

  logic signed [SUM_W-1:0]                     s    [4];
  logic signed [SUM_W+dct_pkg::grow(4)-1:0]  even [4];
  logic signed [OUT_W-1:0]                     odd  [4];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      s[k] = SUM_W'(x[k]) + SUM_W'(x[7-k]);
    end
  end

  dct4 #(.IN_W(SUM_W)) u_even (
    .x (s),
    .y (even)
  );

  dct8_odd #(.IN_W(IN_W)) u_odd (
    .x (x),
    .y (odd)
  );

  // SUM_W + 8 = IN_W + 9 = OUT_W: the even results need no extension.
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      y[2*k]   = even[k];
      y[2*k+1] = odd[k];
    end
  end

endmodule
