// tb_dct_top: end-to-end test of the selectable-order DCT at its default size.
//
// Applies one vector per clock with the order chosen at random, so the mode
// switches often, plus fixed corner vectors in both modes. In 8-point mode
// all eight outputs are compared with the 8-point integer DCT of x[0..7]; in
// 4-point mode y[0..3] and y[4..7] are compared with the 4-point DCTs of
// x[0..3] and x[4..7]. References come from the DCT definition
// (dct_ref_pkg), not from the RTL's constants. The design is combinational,
// so results are checked in the cycle the inputs are applied.
//
// Each mechanism of the design is counted and must occur at least once:
// 8-point transforms, 4-point transform pairs, switches between the two
// orders, and results that need more than 16 bits (where a design with
// 16-bit saturating outputs would have clipped). A watchdog ends the run as a
// failure if it does not finish within a fixed number of cycles.
module tb_dct_top;
  import dct_ref_pkg::*;

  localparam int unsigned IN_W  = dct_pkg::DEFAULT_IN_W;
  localparam int unsigned OUT_W = IN_W + dct_pkg::grow(8);
  localparam int          NRAND = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    order8;
  logic signed [IN_W-1:0]  x [8];
  logic signed [OUT_W-1:0] y [8];

  int checks   = 0;
  int failures = 0;

  int n_order8   = 0;
  int n_order4   = 0;
  int n_switch   = 0;
  int n_wide     = 0;
  logic last_order8 = 1'b0;
  bit   first       = 1'b1;

  dct_top dut (.order8(order8), .x(x), .y(y));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int k, input longint got, input longint want);
    checks++;
    if (got > 32767 || got < -32768) n_wide++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("order8=%0b y[%0d] mismatch: got %0d want %0d", order8, k, got, want);
    end
  endtask

  task automatic apply(input bit o8, input longint xs [8]);
    longint lo_x [8], hi_x [8];
    @(negedge clk);
    order8 = o8;
    for (int n = 0; n < 8; n++) x[n] = IN_W'(xs[n]);
    @(posedge clk);
    if (!first && (o8 != last_order8)) n_switch++;
    first       = 1'b0;
    last_order8 = o8;
    if (o8) begin
      n_order8++;
      for (int k = 0; k < 8; k++) check(k, longint'(y[k]), dct_out(8, k, xs));
    end else begin
      n_order4++;
      lo_x = '{default: 0};
      hi_x = '{default: 0};
      for (int n = 0; n < 4; n++) begin
        lo_x[n] = xs[n];
        hi_x[n] = xs[n+4];
      end
      for (int k = 0; k < 4; k++) begin
        check(k,     longint'(y[k]),   dct_out(4, k, lo_x));
        check(k + 4, longint'(y[k+4]), dct_out(4, k, hi_x));
      end
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("%-36s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("never happened: %s", what);
    end
  endtask

  initial begin
    longint xs [8];
    longint lo, hi;
    lo = -(64'sd1 <<< (IN_W - 1));
    hi = (64'sd1 <<< (IN_W - 1)) - 1;
    order8 = 1'b0;
    for (int n = 0; n < 8; n++) x[n] = '0;

    // Corner vectors, each in both modes.
    for (int m = 0; m < 2; m++) begin
      xs = '{default: 0};
      apply(m[0], xs);
      xs = '{default: hi};
      apply(m[0], xs);
      xs = '{default: lo};
      apply(m[0], xs);
      for (int i = 0; i < 8; i++) xs[i] = (i % 2 == 0) ? hi : lo;
      apply(m[0], xs);
      for (int i = 0; i < 8; i++) xs[i] = (i < 4) ? hi : lo;
      apply(m[0], xs);
      for (int i = 0; i < 8; i++) begin
        xs = '{default: 0};
        xs[i] = 1;
        apply(m[0], xs);
      end
    end

    // Random vectors with a random order per vector.
    for (int r = 0; r < NRAND; r++) begin
      for (int i = 0; i < 8; i++) xs[i] = rand_sample(IN_W);
      apply($urandom_range(1) == 1, xs);
    end

    need("8-point transforms", n_order8);
    need("4-point transform pairs", n_order4);
    need("order switches", n_switch);
    need("results wider than 16 bits", n_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
