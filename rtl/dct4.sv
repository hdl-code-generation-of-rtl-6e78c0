// dct4: 4-point 1D DCT without multipliers.
//
// The 4-point DCT matrix (d16 = 64, d8 = 84, d24 = 35)
//   [ d16  d16  d16  d16 ]
//   [ d8   d24 -d24 -d8  ]
//   [ d16 -d16 -d16  d16 ]
//   [ d24 -d8   d8  -d24 ]
// splits by row symmetry. The even rows are even symmetric: they act on the
// sums x0+x3 and x1+x2 and form a 2-point DCT (dct2). The odd rows are odd
// symmetric: they act on the differences x0-x3 and x1-x2 (dct4_odd). The
// outputs are put back in natural order Y0..Y3. The result is the unscaled
// integer transform: the a(u) normalisation of the DCT definition is left to
// whatever follows.
//
// The matrix and the even/odd split follow the source design; building the
// even half as a dct2 instance and the full-precision widths are this
// design's choices.
//
// Interface: x[0..3] signed IN_W-bit; y[0..3] signed (IN_W+8)-bit.
// Timing: purely combinational, zero latency.
module dct4 #(
  parameter int unsigned IN_W = dct_pkg::DEFAULT_IN_W
) (
  input  logic signed [IN_W-1:0]                    x [4],
  output logic signed [IN_W+dct_pkg::grow(4)-1:0] y [4]
);

  localparam int unsigned OUT_W = IN_W + dct_pkg::grow(4);
  localparam int unsigned SUM_W = IN_W + 1;

  logic signed [SUM_W-1:0]   s0, s1;
  logic signed [SUM_W+6:0]   even0, even2;
  logic signed [OUT_W-1:0]   odd1, odd3;

  always_comb begin
    s0 = SUM_W'(x[0]) + SUM_W'(x[3]);
    s1 = SUM_W'(x[1]) + SUM_W'(x[2]);
  end

  dct2 #(.IN_W(SUM_W)) u_even (
    .a  (s0),
    .b  (s1),
    .y0 (even0),
    .y1 (even2)
  );

  dct4_odd #(.IN_W(IN_W)) u_odd (
    .x  (x),
    .y1 (odd1),
    .y3 (odd3)
  );

  // SUM_W + 7 = IN_W + 8 = OUT_W, so the even results need no extension.
  always_comb begin
    y[0] = even0;
    y[1] = odd1;
    y[2] = even2;
    y[3] = odd3;
  end

endmodule
