// tb_dct4: self-checking test of dct4 (4-point DCT, 4 checked outputs per vector).
//
// Drives corner vectors (all zero, single unit impulses, all full-scale
// positive, all full-scale negative, alternating extremes) and random
// vectors, one per clock, and compares every output with the integer DCT
// computed from its definition in dct_ref_pkg. The block is combinational,
// so each result is checked in the cycle its inputs are applied (zero
// latency). A watchdog ends the run as a failure if it does not finish
// within a fixed number of cycles.
module tb_dct4;
  import dct_ref_pkg::*;

  localparam int unsigned IN_W  = 16;
  localparam int unsigned OUT_W = IN_W + 8;
  localparam int          NPTS  = 4;
  localparam int          NRAND = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [IN_W-1:0]  x [NPTS];
  logic signed [OUT_W-1:0] y [NPTS];

  int checks   = 0;
  int failures = 0;

  dct4 #(.IN_W(IN_W)) dut (.x(x), .y(y));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input longint xs [8]);
    @(negedge clk);
    for (int n = 0; n < NPTS; n++) x[n] = IN_W'(xs[n]);
    @(posedge clk);
    for (int k = 0; k < NPTS; k++) check($sformatf("Y%0d", k), longint'(y[k]), dct_out(NPTS, k, xs));
  endtask

  task automatic check(input string name, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("%s mismatch: got %0d want %0d", name, got, want);
    end
  endtask

  initial begin
    longint xs [8];
    longint lo, hi;
    lo = -(64'sd1 <<< (IN_W - 1));
    hi = (64'sd1 <<< (IN_W - 1)) - 1;
    for (int n = 0; n < NPTS; n++) x[n] = '0;
    xs = '{default: 0};
    apply(xs);
    for (int i = 0; i < NPTS; i++) begin
      xs = '{default: 0};
      xs[i] = 1;
      apply(xs);
      xs[i] = -1;
      apply(xs);
    end
    xs = '{default: hi};
    apply(xs);
    xs = '{default: lo};
    apply(xs);
    for (int i = 0; i < 8; i++) xs[i] = (i % 2 == 0) ? hi : lo;
    apply(xs);
    for (int i = 0; i < 8; i++) xs[i] = (i < NPTS / 2) ? hi : lo;
    apply(xs);
    for (int r = 0; r < NRAND; r++) begin
      for (int i = 0; i < 8; i++) xs[i] = rand_sample(IN_W);
      apply(xs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
