// sf_harness: stimulus and reference model for rsb_systolic_fir.
//
// Instantiates the systolic filter at the given size and runs RUNS runs. Each
// run loads one coefficient set and two sample sequences X1 and X2 of NWORDS
// samples followed by L-1 zero samples, interleaves them bit by bit into
// word-pair slots of 2W clocks (W = N+M+K), records y_out for every clock and
// then decodes Y1 and Y2 from it: bit b of y1(n) in clock 2b+1 of slot n and
// bit b of y2(n) in clock 2b+2. Both are compared with sum_i f(i) x(n-i)
// computed here. Run 0 uses the example data f = F, 7, A, C and
// X1 = 5, 9, B, 3 (hexadecimal), with X2 = 3, B, 9, 5, when PAPER is set;
// run 1 uses all-ones data (guard bits in use); the others random values.
// x_in changes on the falling clock edge and y_out is sampled 1 time unit later.
module sf_harness
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
  output int   words,         // output words checked
  output int   x2_words       // nonzero words of the second sequence
);
  localparam int unsigned K = guard_bits(L);
  localparam int unsigned W = N + M + K;
  localparam int unsigned NSLOT = NWORDS + L - 1;

  logic rst;
  logic [L-1:0][M-1:0] coef;
  logic x_in, y_out;

  rsb_systolic_fir #(.N(N), .M(M), .L(L)) dut (
    .clk(clk), .rst(rst), .coef(coef), .x_in(x_in), .y_out(y_out));

  task automatic check_word(input int r, input int s, input int n, input logic [63:0] got,
                            input logic [63:0] expect_y);
    checks++; words++;
    if (expect_y >= (64'd1 << (N + M))) guard_words++;
    if (got !== expect_y) begin
      failures++;
      $display("N=%0d M=%0d L=%0d run %0d: y%0d(%0d) = %0d, expected %0d", N, M, L, r, s, n, got, expect_y);
    end
  endtask

  initial begin
    logic [N-1:0] x1 [NSLOT + 1];
    logic [N-1:0] x2 [NSLOT + 1];
    logic ystream [(NSLOT + 1) * 2 * W];
    logic [63:0] e1, e2, g1, g2;
    done = 1'b0; checks = 0; failures = 0; guard_words = 0; words = 0; x2_words = 0;
    rst = 1'b1; x_in = 1'b0; coef = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < RUNS; r++) begin
      for (int i = 0; i < L; i++) coef[i] = M'($urandom);
      for (int n = 0; n <= NSLOT; n++) begin
        x1[n] = (n < NWORDS) ? N'($urandom) : '0;
        x2[n] = (n < NWORDS) ? N'($urandom) : '0;
      end
      if (r == 0 && PAPER) begin
        coef[0] = M'(4'hF); coef[1] = M'(4'h7); coef[2] = M'(4'hA); coef[3] = M'(4'hC);
        x1[0] = N'(4'h5); x1[1] = N'(4'h9); x1[2] = N'(4'hB); x1[3] = N'(4'h3);
        x2[0] = N'(4'h3); x2[1] = N'(4'hB); x2[2] = N'(4'h9); x2[3] = N'(4'h5);
        for (int n = 4; n <= NSLOT; n++) begin x1[n] = '0; x2[n] = '0; end
      end
      if (r == 1) begin
        coef = '1;
        for (int n = 0; n < NWORDS; n++) begin x1[n] = '1; x2[n] = '1; end
      end
      for (int n = 0; n < NWORDS; n++) if (x2[n] != '0) x2_words++;
      // one extra (all-zero) slot so the last bit of y2 is recorded
      for (int t = 0; t < (NSLOT + 1) * 2 * W; t++) begin
        int n, c, b;
        n = t / (2 * W); c = t % (2 * W); b = c / 2;
        @(negedge clk);
        if (b < N) x_in = (c % 2 == 0) ? x1[n][b] : x2[n][b];
        else x_in = 1'b0;
        #1 ystream[t] = y_out;
      end
      for (int n = 0; n < NSLOT; n++) begin
        e1 = '0; e2 = '0; g1 = '0; g2 = '0;
        for (int i = 0; i < L; i++)
          if (n >= i) begin
            e1 += 64'(coef[i]) * 64'(x1[n-i]);
            e2 += 64'(coef[i]) * 64'(x2[n-i]);
          end
        for (int b = 0; b < W; b++) begin
          g1[b] = ystream[n * 2 * W + 2 * b + 1];
          g2[b] = ystream[n * 2 * W + 2 * b + 2];
        end
        check_word(r, 1, n, g1, e1);
        check_word(r, 2, n, g2, e2);
      end
    end
    done = 1'b1;
  end
endmodule
