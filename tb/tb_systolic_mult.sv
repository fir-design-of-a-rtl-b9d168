// tb_systolic_mult: self-checking test of the bit-level systolic multiplier.
//
// Two random sequences X1, X2 of 16-bit words are interleaved bit by bit into
// slots of 2*(16+16+2) = 68 clocks (the systolic filter's slot at full size)
// and multiplied by a random 16-bit coefficient (M = 16); bit k of F*X1 must
// appear on p_out in clock 2k+1 of the slot and bit k of F*X2 in clock 2k+2.
// Each slot is followed by one idle clock in which the last product bit is
// read; there is no reset between slots. x_out must be x_in delayed 16 clocks.
// A second instance with M = 4 multiplies the example operands
// (F, 7, A, C times 5, 9, B, 3, hexadecimal) in 20-clock slots.
module tb_systolic_mult;
  localparam int SLOT = 68;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic x16, xo16, p16, x4, xo4, p4;
  logic [15:0] f16;
  logic [3:0] f4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  systolic_mult #(.M(16)) u16 (.clk(clk), .rst(rst), .f(f16), .x_in(x16), .x_out(xo16), .p_out(p16));
  systolic_mult #(.M(4))  u4  (.clk(clk), .rst(rst), .f(f4),  .x_in(x4),  .x_out(xo4),  .p_out(p4));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a1, a2;
    logic xh [$];
    logic [SLOT:0] ys;   // clock 0..SLOT of the slot (clock SLOT = next slot's clock 0)
    logic [31:0] g1, g2;
    logic [3:0] fs [4];
    logic [3:0] xs [4];
    logic [7:0] h1, h2;
    logic [20:0] ys4;
    fs = '{4'hF, 4'h7, 4'hA, 4'hC};
    xs = '{4'h5, 4'h9, 4'hB, 4'h3};
    x16 = 0; x4 = 0; f16 = '0; f4 = '0;
    for (int i = 0; i < 16; i++) xh.push_back(1'b0);
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w < 120; w++) begin
      a1 = 16'($urandom); a2 = 16'($urandom); f16 = 16'($urandom);
      if (w == 1) begin a1 = '1; a2 = '1; f16 = '1; end
      for (int c = 0; c < SLOT; c++) begin
        @(negedge clk);
        x16 = (c / 2 < 16) ? ((c % 2 == 0) ? a1[c/2] : a2[c/2]) : 1'b0;
        xh.push_back(x16);
        #1 ys[c] = p16;
        checks++;
        if (xo16 !== xh[xh.size() - 17]) begin failures++; $display("x_out wrong at word %0d clock %0d", w, c); end
      end
      // the last bit of the second product falls on clock 0 of the next slot
      @(negedge clk);
      x16 = 1'b0;
      xh.push_back(x16);
      #1 ys[SLOT] = p16;
      for (int k = 0; k < 32; k++) begin
        g1[k] = ys[2*k+1];
        g2[k] = ys[2*k+2];
      end
      checks += 2;
      if (g1 !== 32'(a1) * 32'(f16)) begin failures++; $display("X1 %h * %h gave %h", a1, f16, g1); end
      if (g2 !== 32'(a2) * 32'(f16)) begin failures++; $display("X2 %h * %h gave %h", a2, f16, g2); end
    end
    for (int i = 0; i < 4; i++) begin
      f4 = fs[i];
      for (int c = 0; c < 21; c++) begin
        @(negedge clk);
        x4 = (c / 2 < 4 && c < 20) ? ((c % 2 == 0) ? xs[i][c/2] : xs[3-i][c/2]) : 1'b0;
        #1 ys4[c] = p4;
      end
      for (int k = 0; k < 8; k++) begin h1[k] = ys4[2*k+1]; h2[k] = ys4[2*k+2]; end
      checks += 2;
      if (h1 !== 8'(fs[i]) * 8'(xs[i]))   begin failures++; $display("M=4: %h * %h gave %h", fs[i], xs[i], h1); end
      if (h2 !== 8'(fs[i]) * 8'(xs[3-i])) begin failures++; $display("M=4: %h * %h gave %h", fs[i], xs[3-i], h2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
