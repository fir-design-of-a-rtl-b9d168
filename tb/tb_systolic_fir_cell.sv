// tb_systolic_fir_cell: self-checking test of one systolic filter cell.
//
// The cell (M = 16) gets two interleaved random 16-bit sequences on x_in and
// two interleaved random 33-bit partial sums on y_in, each partial-sum bit k
// placed in the clock where the product bit k leaves the multiplier (clock
// 2k+1 for the first sequence, 2k+2 for the second, within a 68-clock slot).
// y_out must then carry y_in + f*x for both sequences, bit k in the same
// clocks, and x_out must be x_in delayed 16 clocks. A second instance
// (M = 4) uses the example coefficient F and sample 5.
module tb_systolic_fir_cell;
  localparam int SLOT = 68;
  localparam int YB = 34;   // partial-sum bits per word, N+M+K
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic x_in, x_out, y_in, y_out;
  logic [15:0] f;
  logic xs, xso, ysi, yso;
  logic [3:0] fs4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  systolic_fir_cell #(.M(16)) dut (.clk(clk), .rst(rst), .f(f), .x_in(x_in), .x_out(x_out),
                                   .y_in(y_in), .y_out(y_out));
  systolic_fir_cell #(.M(4)) dut4 (.clk(clk), .rst(rst), .f(fs4), .x_in(xs), .x_out(xso),
                                   .y_in(ysi), .y_out(yso));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream of one slot plus the clock after it: drive x and y, read y_out
  task automatic run_slot(input logic [15:0] a1, input logic [15:0] a2,
                          input logic [63:0] b1, input logic [63:0] b2,
                          output logic [63:0] g1, output logic [63:0] g2);
    logic [SLOT:0] ys;
    for (int c = 0; c <= SLOT; c++) begin
      @(negedge clk);
      x_in = (c < SLOT && c / 2 < 16) ? ((c % 2 == 0) ? a1[c/2] : a2[c/2]) : 1'b0;
      if (c % 2 == 1 && (c - 1) / 2 < YB) y_in = b1[(c-1)/2];
      else if (c % 2 == 0 && c > 0 && (c - 2) / 2 < YB) y_in = b2[(c-2)/2];
      else y_in = 1'b0;
      #1 ys[c] = y_out;
    end
    g1 = '0; g2 = '0;
    for (int k = 0; k < YB; k++) begin g1[k] = ys[2*k+1]; g2[k] = ys[2*k+2]; end
  endtask

  logic xhist [$];
  always @(negedge clk) begin
    #2;
    xhist.push_back(x_in);
    if (xhist.size() > 17) begin
      checks++;
      if (x_out !== xhist[xhist.size() - 17]) begin failures++; $display("x_out wrong at %0t", $time); end
    end
  end

  initial begin
    logic [15:0] a1, a2;
    logic [63:0] b1, b2, g1, g2, e1, e2;
    logic [20:0] ys4;
    logic [7:0] h;
    x_in = 0; y_in = 0; f = '0; xs = 0; ysi = 0; fs4 = 4'hF;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w < 100; w++) begin
      a1 = 16'($urandom); a2 = 16'($urandom); f = 16'($urandom);
      b1 = {31'd0, 33'({$urandom, $urandom})}; b2 = {31'd0, 33'({$urandom, $urandom})};
      if (w == 1) begin a1 = '1; a2 = '1; f = '1; b1 = 64'h1_FFFF_FFFF - 64'hFFFE0001; b2 = b1; end
      run_slot(a1, a2, b1, b2, g1, g2);
      e1 = b1 + 64'(a1) * 64'(f);
      e2 = b2 + 64'(a2) * 64'(f);
      checks += 2;
      if (g1 !== e1) begin failures++; $display("seq 1: %h + %h*%h gave %h", b1, a1, f, g1); end
      if (g2 !== e2) begin failures++; $display("seq 2: %h + %h*%h gave %h", b2, a2, f, g2); end
    end
    // M = 4: first sequence x = 5 with partial sum 3, second sequence x = 0
    // with partial sum FF: results F*5 + 3 = 4E and FF
    begin
      logic [3:0] xv;
      logic [7:0] yv1, yv2;
      xv = 4'h5; yv1 = 8'h03; yv2 = 8'hFF;
      for (int c = 0; c < 21; c++) begin
        @(negedge clk);
        xs  = (c < 8 && c % 2 == 0) ? xv[c/2] : 1'b0;
        if (c % 2 == 1 && c < 16) ysi = yv1[(c-1)/2];
        else if (c % 2 == 0 && c > 0 && c <= 16) ysi = yv2[(c-2)/2];
        else ysi = 1'b0;
        #1 ys4[c] = yso;
      end
    end
    h = '0;
    for (int k = 0; k < 8; k++) h[k] = ys4[2*k+1];
    checks++;
    if (h !== 8'h4E) begin failures++; $display("M=4 seq 1 gave %h", h); end
    h = '0;
    for (int k = 0; k < 8; k++) h[k] = ys4[2*k+2];
    checks++;
    if (h !== 8'hFF) begin failures++; $display("M=4 seq 2 gave %h", h); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
