// dct8_odd: odd outputs Y1, Y3, Y5, Y7 of the 8-point DCT, shifts and adds only.
//
// The odd rows of the 8-point DCT matrix are odd symmetric, so they act only
// on the four differences e_k = x_k - x_(7-k). With the coefficients
// c1 = 89, c3 = 75, c5 = 50, c7 = 18 (round(64*sqrt(2)*cos(k*pi/16)), the
// same rule that gives 84 and 35 for the 4-point transform) the rows are
//   Y1 = 89 e0 + 75 e1 + 50 e2 + 18 e3
//   Y3 = 75 e0 - 18 e1 - 89 e2 - 50 e3
//   Y5 = 50 e0 - 89 e1 + 18 e2 + 75 e3
//   Y7 = 18 e0 - 50 e1 + 75 e2 - 89 e3
// Each difference is multiplied by the four constants as shift-add sums
//   89 e = (e<<<6) + (e<<<4) + (e<<<3) + e
//   75 e = (e<<<6) + (e<<<3) + (e<<<1) + e
//   50 e = (e<<<5) + (e<<<4) + (e<<<1)
//   18 e = (e<<<4) + (e<<<1)
// and the products are summed with the signs of each row. The coefficient
// values and their shift-add split are this design's choices; the source
// design names the multiplier-free 8-point transform but prints neither.
//
// Interface: x[0..7] signed IN_W-bit; y[0..3] = Y1, Y3, Y5, Y7, signed
// (IN_W+9)-bit, full precision.
// Timing: purely combinational, zero latency.
module dct8_odd #(
  parameter int unsigned IN_W = dct_pkg::DEFAULT_IN_W
) (
  input  logic signed [IN_W-1:0]                    x [8],
  output logic signed [IN_W+dct_pkg::grow(8)-1:0] y [4]
);

  localparam int unsigned OUT_W = IN_W + dct_pkg::grow(8);

  logic signed [OUT_W-1:0] e   [4];
  logic signed [OUT_W-1:0] m89 [4];
  logic signed [OUT_W-1:0] m75 [4];
  logic signed [OUT_W-1:0] m50 [4];
  logic signed [OUT_W-1:0] m18 [4];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      e[k]   = OUT_W'(x[k]) - OUT_W'(x[7-k]);
      m89[k] = (e[k] <<< 6) + (e[k] <<< 4) + (e[k] <<< 3) + e[k];
      m75[k] = (e[k] <<< 6) + (e[k] <<< 3) + (e[k] <<< 1) + e[k];
      m50[k] = (e[k] <<< 5) + (e[k] <<< 4) + (e[k] <<< 1);
      m18[k] = (e[k] <<< 4) + (e[k] <<< 1);
    end
    y[0] = m89[0] + m75[1] + m50[2] + m18[3];
    y[1] = m75[0] - m18[1] - m89[2] - m50[3];
    y[2] = m50[0] - m89[1] + m18[2] + m75[3];
    y[3] = m18[0] - m50[1] + m75[2] - m89[3];
  end

endmodule
