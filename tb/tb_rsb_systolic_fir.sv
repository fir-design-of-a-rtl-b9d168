// tb_rsb_systolic_fir: self-checking test of the bit-level systolic filter.
//
// Three sizes run in parallel, each with its own reference model (sf_harness):
//   N = M = 4, L = 4  the document's example data, word-pair slot 2W = 20
//   N = 5, M = 3, L = 3  unequal widths, tap count not a power of two
//   N = M = 16, L = 4  the full size, 2W = 68
// Both interleaved output sequences are checked word by word; each size must
// have used the guard bits and carried a nonzero second sequence.
module tb_rsb_systolic_fir;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done_a, done_b, done_c;
  int ca, fa, ga, wa, xa, cb, fb, gb, wb, xb, cc, fc, gc, wc, xc;
  int checks = 0, failures = 0;

  sf_harness #(.N(4),  .M(4),  .L(4), .NWORDS(12), .RUNS(6), .PAPER(1'b1))
    h_a (.clk(clk), .done(done_a), .checks(ca), .failures(fa), .guard_words(ga), .words(wa), .x2_words(xa));
  sf_harness #(.N(5),  .M(3),  .L(3), .NWORDS(12), .RUNS(6), .PAPER(1'b0))
    h_b (.clk(clk), .done(done_b), .checks(cb), .failures(fb), .guard_words(gb), .words(wb), .x2_words(xb));
  sf_harness #(.N(16), .M(16), .L(4), .NWORDS(20), .RUNS(4), .PAPER(1'b0))
    h_c (.clk(clk), .done(done_c), .checks(cc), .failures(fc), .guard_words(gc), .words(wc), .x2_words(xc));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done_a && done_b && done_c);
    checks = ca + cb + cc;
    failures += fa + fb + fc;
    checks += 3;
    if (ga == 0 || xa == 0) begin failures++; $display("4x4 run: guard bits or second sequence unused"); end
    if (gb == 0 || xb == 0) begin failures++; $display("5x3 run: guard bits or second sequence unused"); end
    if (gc == 0 || xc == 0) begin failures++; $display("16x16 run: guard bits or second sequence unused"); end
    $display("words checked: %0d, %0d, %0d; using guard bits: %0d, %0d, %0d", wa, wb, wc, ga, gb, gc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
