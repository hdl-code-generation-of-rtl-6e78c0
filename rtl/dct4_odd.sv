// dct4_odd: odd outputs of the 4-point DCT, with shifts and adds only.
//
// Rows 1 and 3 of the 4-point DCT matrix are odd symmetric, [c1 c3 -c3 -c1]
// and [c3 -c1 c1 -c3], so each row needs only the two differences
//   d1 = x0 - x3,   d2 = x1 - x2.
// With c1 = 84 and c3 = 35 the four constant products are shift-add sums:
//   84*d = (d <<< 6) + (d <<< 4) + (d <<< 2)
//   35*d = (d <<< 5) + (d <<< 1) + d
// and the outputs are
//   Y1 = 84*d1 + 35*d2
//   Y3 = 35*d1 - 84*d2.
// The differences, the constants and their shift-add split are those of the
// source design's reference function; its int16 words would saturate, while
// this block grows the word to IN_W+8 bits so it never overflows.
//
// Interface: x[0..3] signed IN_W-bit samples; y1, y3 signed (IN_W+8)-bit.
// Timing: purely combinational, zero latency.
module dct4_odd #(
  parameter int unsigned IN_W = dct_pkg::DEFAULT_IN_W
) (
  input  logic signed [IN_W-1:0]                    x [4],
  output logic signed [IN_W+dct_pkg::grow(4)-1:0] y1,
  output logic signed [IN_W+dct_pkg::grow(4)-1:0] y3
);

  localparam int unsigned OUT_W = IN_W + dct_pkg::grow(4);

  logic signed [OUT_W-1:0] d1, d2;
  logic signed [OUT_W-1:0] d1_x84, d1_x35, d2_x84, d2_x35;

  always_comb begin
    d1 = OUT_W'(x[0]) - OUT_W'(x[3]);
    d2 = OUT_W'(x[1]) - OUT_W'(x[2]);

    d1_x84 = (d1 <<< 6) + (d1 <<< 4) + (d1 <<< 2);
    d2_x35 = (d2 <<< 5) + (d2 <<< 1) + d2;
    d1_x35 = (d1 <<< 5) + (d1 <<< 1) + d1;
    d2_x84 = (d2 <<< 6) + (d2 <<< 4) + (d2 <<< 2);

    y1 = d1_x84 + d2_x35;
    y3 = d1_x35 - d2_x84;
  end

endmodule
