// tb_rsb_fir_top: end-to-end test of both filters at full size.
//
// The top is used with its default parameters (N = M = 16, L = 4, K = 2, so
// W = 34). Both filters share the coefficients and run at the same time: in
// every 68-clock slot the transposed filter takes two samples (one per
// 34-clock word) and the systolic filter one sample of each of its two
// interleaved sequences. All three output sequences are recorded and checked
// word by word against sum_i f(i) x(n-i), including the L-1 drain words.
// Runs: random data; all-ones data (the sums need the guard bits); random
// data after a reset given while both filters hold random state; random data
// with one coefficient changed between runs. The test counts how often each
// mechanism happened (guard bits used by each filter, nonzero second
// interleaved sequence, back-to-back nonzero words, carries past the product
// width, mid-stream reset) and fails if one never did.
module tb_rsb_fir_top;
  localparam int N = 16, M = 16, L = 4, K = 2;
  localparam int W = N + M + K;
  localparam int NW = 16;             // slots of data per run
  localparam int NS = NW + L - 1;     // slots checked per run (with drain)

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [L-1:0][M-1:0] coef;
  logic tf_x_in, tf_y_out, sf_x_in, sf_y_out;
  int checks = 0, failures = 0;
  int n_tf_guard = 0, n_sf_guard = 0, n_x2 = 0, n_b2b = 0, n_reset = 0, n_wide = 0;

  always #5 clk = ~clk;

  rsb_fir_top dut (
    .clk(clk), .rst(rst), .coef(coef),
    .tf_x_in(tf_x_in), .tf_y_out(tf_y_out),
    .sf_x_in(sf_x_in), .sf_y_out(sf_y_out));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] conv(input logic [N-1:0] xs [], input int n);
    logic [63:0] s = '0;
    for (int i = 0; i < L; i++)
      if (n >= i && n - i < xs.size()) s += 64'(coef[i]) * 64'(xs[n-i]);
    return s;
  endfunction

  task automatic check(input string what, input int n, input logic [63:0] got, input logic [63:0] e,
                       inout int guard);
    checks++;
    if (e >= (64'd1 << (N + M))) guard++;
    if (got !== e) begin
      failures++;
      $display("%s(%0d) = %h, expected %h", what, n, got, e);
    end
  endtask

  initial begin
    logic [N-1:0] xt [], x1 [], x2 [];
    logic tys [(NS + 1) * 2 * W];
    logic sys [(NS + 1) * 2 * W];
    logic [63:0] g;
    tf_x_in = 1'b0; sf_x_in = 1'b0; coef = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < 4; r++) begin
      xt = new[2 * NW]; x1 = new[NW]; x2 = new[NW];
      if (r != 3) for (int i = 0; i < L; i++) coef[i] = M'($urandom);
      else coef[1] = ~coef[1];
      foreach (xt[i]) xt[i] = N'($urandom);
      foreach (x1[i]) begin x1[i] = N'($urandom); x2[i] = N'($urandom); end
      if (r == 1) begin
        coef = '1;
        foreach (xt[i]) xt[i] = '1;
        foreach (x1[i]) begin x1[i] = '1; x2[i] = '1; end
      end
      if (r == 2) begin
        // leave both filters full of random state, then reset
        for (int t = 0; t < 3 * W; t++) begin
          @(negedge clk);
          tf_x_in = 1'($urandom); sf_x_in = 1'($urandom);
        end
        @(negedge clk); rst = 1'b1; tf_x_in = 1'b0; sf_x_in = 1'b0;
        @(negedge clk); rst = 1'b0;
        n_reset++;
      end
      for (int i = 1; i < 2 * NW; i++) if (xt[i] != '0 && xt[i-1] != '0) n_b2b++;
      foreach (x2[i]) if (x2[i] != '0) n_x2++;
      // stream (one extra all-zero slot so the last systolic bit is recorded)
      for (int t = 0; t < (NS + 1) * 2 * W; t++) begin
        int w, b, s, c;
        w = t / W; b = t % W;
        s = t / (2 * W); c = t % (2 * W);
        @(negedge clk);
        tf_x_in = (w < 2 * NW && b < N) ? xt[w][b] : 1'b0;
        sf_x_in = (s < NW && c / 2 < N) ? ((c % 2 == 0) ? x1[s][c/2] : x2[s][c/2]) : 1'b0;
        #1 tys[t] = tf_y_out; sys[t] = sf_y_out;
      end
      for (int n = 0; n < 2 * NW + L - 1; n++) begin
        g = '0;
        for (int b = 0; b < W; b++) g[b] = tys[n * W + b];
        check("transposed y", n, g, conv(xt, n), n_tf_guard);
        if (conv(xt, n) >= (64'd1 << (N + M + 1))) n_wide++;
      end
      for (int n = 0; n < NS; n++) begin
        g = '0;
        for (int b = 0; b < W; b++) g[b] = sys[n * 2 * W + 2 * b + 1];
        check("systolic y1", n, g, conv(x1, n), n_sf_guard);
        g = '0;
        for (int b = 0; b < W; b++) g[b] = sys[n * 2 * W + 2 * b + 2];
        check("systolic y2", n, g, conv(x2, n), n_sf_guard);
      end
    end
    $display("mechanisms: transposed guard-bit words %0d, systolic guard-bit words %0d, second-sequence words %0d, back-to-back words %0d, sums over N+M+1 bits %0d, mid-stream resets %0d",
             n_tf_guard, n_sf_guard, n_x2, n_b2b, n_wide, n_reset);
    checks += 6;
    if (n_tf_guard == 0) begin failures++; $display("transposed filter never used the guard bits"); end
    if (n_sf_guard == 0) begin failures++; $display("systolic filter never used the guard bits"); end
    if (n_x2 == 0)       begin failures++; $display("second interleaved sequence never carried data"); end
    if (n_b2b == 0)      begin failures++; $display("no back-to-back words"); end
    if (n_wide == 0)     begin failures++; $display("no sum needed both guard bits"); end
    if (n_reset == 0)    begin failures++; $display("no mid-stream reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
