// tf_harness: stimulus and reference model for rsb_transposed_fir.
//
// Instantiates the transposed filter at the given size and runs RUNS runs.
// Each run loads one coefficient set, sends NWORDS samples followed by L-1
// zero samples (so the filter drains), and compares every output word y(n)
// with sum_i f(i) x(n-i) computed here in 64-bit arithmetic. Run 0 uses the
// example data f = F, 7, A, C and x = 5, 9, B, 3 (hexadecimal) when PAPER is
// set, run 1 uses all-ones coefficients and samples (largest sums, guard bits
// in use), the others random values. Word slots are W = N+M+K clocks, sent
// back to back; the output bit of weight k is read in the same clock as the
// input slot position k, which checks the filter's zero latency and its rate
// of one word per W clocks. x_in changes on the falling clock edge and y_out is
// sampled 1 time unit later.
module tf_harness
  import rsb_fir_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4,
  parameter int unsigned L = 4,
  parameter int unsigned NWORDS = 12,
  parameter int unsigned RUNS = 4,
  parameter bit PAPER = 1'b1
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   guard_words,   // output words that needed the guard bits
  output int   words          // output words checked
);
  localparam int unsigned K = guard_bits(L);
  localparam int unsigned W = N + M + K;

  logic rst;
  logic [L-1:0][M-1:0] coef;
  logic x_in, y_out;

  rsb_transposed_fir #(.N(N), .M(M), .L(L)) dut (
    .clk(clk), .rst(rst), .coef(coef), .x_in(x_in), .y_out(y_out));

  initial begin
    logic [N-1:0] xs [NWORDS + L];
    logic [63:0] expect_y, got;
    done = 1'b0; checks = 0; failures = 0; guard_words = 0; words = 0;
    rst = 1'b1; x_in = 1'b0; coef = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < RUNS; r++) begin
      for (int i = 0; i < L; i++) coef[i] = M'($urandom);
      for (int n = 0; n < NWORDS + L; n++) xs[n] = (n < NWORDS) ? N'($urandom) : '0;
      if (r == 0 && PAPER) begin
        coef[0] = M'(4'hF); coef[1] = M'(4'h7); coef[2] = M'(4'hA); coef[3] = M'(4'hC);
        xs[0] = N'(4'h5); xs[1] = N'(4'h9); xs[2] = N'(4'hB); xs[3] = N'(4'h3);
        for (int n = 4; n < NWORDS + L; n++) xs[n] = '0;
      end
      if (r == 1) begin
        coef = '1;
        for (int n = 0; n < NWORDS; n++) xs[n] = '1;
      end
      for (int n = 0; n < NWORDS + L - 1; n++) begin
        got = '0;
        for (int b = 0; b < W; b++) begin
          @(negedge clk);
          x_in = (b < N) ? xs[n][b] : 1'b0;
          #1 got[b] = y_out;
        end
        expect_y = '0;
        for (int i = 0; i < L; i++)
          if (n >= i) expect_y += 64'(coef[i]) * 64'(xs[n-i]);
        checks++; words++;
        if (expect_y >= (64'd1 << (N + M))) guard_words++;
        if (got !== expect_y) begin
          failures++;
          $display("N=%0d M=%0d L=%0d run %0d: y(%0d) = %0d, expected %0d", N, M, L, r, n, got, expect_y);
        end
      end
    end
    done = 1'b1;
  end
endmodule
