// tb_rsb_transposed_fir: self-checking test of the bit-level transposed filter.
//
// Three sizes run in parallel, each with its own reference model (tf_harness):
//   N = M = 4, L = 4  the document's example (f = F,7,A,C; x = 5,9,B,3), W = 10
//   N = 5, M = 3, L = 3  unequal widths and a tap count that is not a power of two
//   N = M = 16, L = 4  the full size, W = 34
// Every output word is compared with the convolution sum, and every size must
// have produced words that used the guard bits.
module tb_rsb_transposed_fir;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done_a, done_b, done_c;
  int ca, fa, ga, wa, cb, fb, gb, wb, cc, fc, gc, wc;
  int checks = 0, failures = 0;

  tf_harness #(.N(4),  .M(4),  .L(4), .NWORDS(12), .RUNS(6), .PAPER(1'b1))
    h_a (.clk(clk), .done(done_a), .checks(ca), .failures(fa), .guard_words(ga), .words(wa));
  tf_harness #(.N(5),  .M(3),  .L(3), .NWORDS(12), .RUNS(6), .PAPER(1'b0))
    h_b (.clk(clk), .done(done_b), .checks(cb), .failures(fb), .guard_words(gb), .words(wb));
  tf_harness #(.N(16), .M(16), .L(4), .NWORDS(20), .RUNS(4), .PAPER(1'b0))
    h_c (.clk(clk), .done(done_c), .checks(cc), .failures(fc), .guard_words(gc), .words(wc));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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
    if (ga == 0) begin failures++; $display("4x4 run never used the guard bits"); end
    if (gb == 0) begin failures++; $display("5x3 run never used the guard bits"); end
    if (gc == 0) begin failures++; $display("16x16 run never used the guard bits"); end
    $display("words checked: %0d, %0d, %0d; using guard bits: %0d, %0d, %0d", wa, wb, wc, ga, gb, gc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
