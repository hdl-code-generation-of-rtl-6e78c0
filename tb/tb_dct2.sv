// tb_dct2: self-checking test of the 2-point shift DCT.
//
// Drives corner pairs (zero, full-scale positive and negative in every
// combination) and random pairs, one pair per clock, and compares y0 and y1
// with the reference dot products 64*(a+b) and 64*(a-b) computed from the
// DCT definition. The block is combinational, so results are checked in the
// same cycle (zero latency). A watchdog ends the run as a failure if it
// does not finish within a fixed number of cycles.
module tb_dct2;
  import dct_ref_pkg::*;

  localparam int unsigned IN_W  = 17;
  localparam int unsigned OUT_W = IN_W + 7;
  localparam int          NRAND = 2000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [IN_W-1:0]  a, b;
  logic signed [OUT_W-1:0] y0, y1;

  int checks   = 0;
  int failures = 0;
  int cycles   = 0;

  dct2 #(.IN_W(IN_W)) dut (.a(a), .b(b), .y0(y0), .y1(y1));

  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input longint va, input longint vb);
    longint xs [8];
    longint ref0, ref1;
    xs = '{default: 0};
    xs[0] = va;
    xs[1] = vb;
    @(negedge clk);
    a = IN_W'(va);
    b = IN_W'(vb);
    @(posedge clk);
    ref0 = dct_out(2, 0, xs);
    ref1 = dct_out(2, 1, xs);
    checks += 2;
    if (longint'(y0) != ref0) begin
      failures++;
      if (failures < 10) $display("y0 mismatch a=%0d b=%0d got %0d want %0d", va, vb, y0, ref0);
    end
    if (longint'(y1) != ref1) begin
      failures++;
      if (failures < 10) $display("y1 mismatch a=%0d b=%0d got %0d want %0d", va, vb, y1, ref1);
    end
  endtask

  initial begin
    longint lo, hi;
    lo = -(64'sd1 <<< (IN_W - 1));
    hi = (64'sd1 <<< (IN_W - 1)) - 1;
    a = '0;
    b = '0;
    apply(0, 0);
    apply(1, 0);
    apply(0, 1);
    apply(hi, hi);
    apply(lo, lo);
    apply(hi, lo);
    apply(lo, hi);
    for (int i = 0; i < NRAND; i++) apply(rand_sample(IN_W), rand_sample(IN_W));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
