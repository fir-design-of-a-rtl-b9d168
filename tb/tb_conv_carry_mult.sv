// tb_conv_carry_mult: self-checking test of the convolution-carrying multiplier.
//
// u16 (M = 16) multiplies random 16-bit words by random 16-bit coefficients;
// each word is 16 data bits followed by 16 zeros, 32 clocks, back to back with
// no reset, so every word also checks that the previous one left no state.
// Corner words use all-ones operands (longest carry chains). The product bits
// are read in the same clock as the x bit of equal weight, which checks the
// zero latency. u4 (M = 4) repeats the document's example operands:
// coefficients F, 7, A, C times samples 5, 9, B, 3 (hexadecimal).
module tb_conv_carry_mult;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic x16, p16, x4, p4;
  logic [15:0] f16;
  logic [3:0] f4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  conv_carry_mult #(.M(16)) u16 (.clk(clk), .rst(rst), .f(f16), .x_in(x16), .p_out(p16));
  conv_carry_mult #(.M(4))  u4  (.clk(clk), .rst(rst), .f(f4),  .x_in(x4),  .p_out(p4));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] xw;
    logic [31:0] got;
    logic [7:0] got4;
    logic [3:0] fs [4];
    logic [3:0] xs [4];
    fs = '{4'hF, 4'h7, 4'hA, 4'hC};
    xs = '{4'h5, 4'h9, 4'hB, 4'h3};
    x16 = 0; x4 = 0; f16 = '0; f4 = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w < 200; w++) begin
      xw = 16'($urandom);
      f16 = 16'($urandom);
      if (w == 1) begin xw = '1; f16 = '1; end
      if (w == 2) begin xw = 16'h8000; f16 = 16'h8000; end
      if (w == 3) begin xw = '1; f16 = 16'h0001; end
      for (int k = 0; k < 32; k++) begin
        @(negedge clk);
        x16 = (k < 16) ? xw[k] : 1'b0;
        #1 got[k] = p16;
      end
      checks++;
      if (got !== 32'(xw) * 32'(f16)) begin
        failures++; $display("M=16: %h * %h gave %h", xw, f16, got);
      end
    end
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        f4 = fs[i];
        for (int k = 0; k < 8; k++) begin
          @(negedge clk);
          x4 = (k < 4) ? xs[j][k] : 1'b0;
          #1 got4[k] = p4;
        end
        checks++;
        if (got4 !== 8'(fs[i]) * 8'(xs[j])) begin
          failures++; $display("M=4: %h * %h gave %h", fs[i], xs[j], got4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
