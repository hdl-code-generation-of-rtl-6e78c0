// dct_top: multiplier-free 1D DCT of selectable order (4 or 8 points).
//
// The design computes the integer DCT with shifted additions only. It first
// checks the requested order and then runs the matching shift-add transform:
//   order8 = 1 : y[0..7] = 8-point DCT of x[0..7]              (dct8)
//   order8 = 0 : y[0..3] = 4-point DCT of x[0..3] and
//                y[4..7] = 4-point DCT of x[4..7]              (two dct4)
// Inside, dct8 is itself made of a dct4 on the butterfly sums and dct8_odd on
// the differences, and each dct4 of a dct2 and dct4_odd, so every coefficient
// product in the design is a sum of shifted copies of a sample.
//
// The order check and the shift-add transforms follow the source design.
// Making the order a run-time input, and using all eight lanes as two 4-point
// transforms in 4-point mode, are this design's choices; the output
// multiplexer that follows from them is the only logic that is not adders.
//
// Interface: order8 selects the mode; x[0..7] signed IN_W-bit samples;
// y[0..7] signed (IN_W+9)-bit coefficients in natural order (4-point results
// are sign-extended by one bit).
// Timing: purely combinational, no clock and no registers; a new set of
// samples can be applied every cycle of whatever clock surrounds the block.
module dct_top #(
  parameter int unsigned IN_W = dct_pkg::DEFAULT_IN_W
) (
  input  logic                                      order8,
  input  logic signed [IN_W-1:0]                    x [8],
  output logic signed [IN_W+dct_pkg::grow(8)-1:0] y [8]
);

  localparam int unsigned OUT_W  = IN_W + dct_pkg::grow(8);
  localparam int unsigned OUT4_W = IN_W + dct_pkg::grow(4);

  logic signed [IN_W-1:0]   lo_x  [4];
  logic signed [IN_W-1:0]   hi_x  [4];
  logic signed [OUT4_W-1:0] lo_y  [4];
  logic signed [OUT4_W-1:0] hi_y  [4];
  logic signed [OUT_W-1:0]  y8    [8];

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      lo_x[k] = x[k];
      hi_x[k] = x[k+4];
    end
  end

  dct8 #(.IN_W(IN_W)) u_dct8 (
    .x (x),
    .y (y8)
  );

  dct4 #(.IN_W(IN_W)) u_dct4_lo (
    .x (lo_x),
    .y (lo_y)
  );

  dct4 #(.IN_W(IN_W)) u_dct4_hi (
    .x (hi_x),
    .y (hi_y)
  );

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      if (order8) begin
        y[k]   = y8[k];
        y[k+4] = y8[k+4];
      end else begin
        y[k]   = OUT_W'(lo_y[k]);
        y[k+4] = OUT_W'(hi_y[k]);
      end
    end
  end

endmodule
