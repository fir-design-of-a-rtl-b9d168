// tb_shift_reg: self-checking test of the one-bit delay line.
//
// Feeds random bits into a 34-stage line (the transposed filter's word delay
// for N = M = 16, L = 4) and a 1-stage line, keeps its own history of the
// input and checks every clock that q equals the input DEPTH clocks earlier.
// Ends with a reset in mid-stream and checks that the line reads zero after it.
module tb_shift_reg;
  localparam int D = 34;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic d;
  logic q34, q1;
  logic hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shift_reg #(.DEPTH(D)) u34 (.clk(clk), .rst(rst), .d(d), .q(q34));
  shift_reg #(.DEPTH(1)) u1  (.clk(clk), .rst(rst), .d(d), .q(q1));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // after reset the line holds zeros: model that history
    for (int i = 0; i < D; i++) hist.push_back(1'b0);
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      #1;
      checks++;
      if (q34 !== hist[hist.size()-D]) begin
        failures++; $display("t=%0d: q34=%b expected %b", t, q34, hist[hist.size()-D]);
      end
      checks++;
      if (q1 !== hist[hist.size()-1]) begin
        failures++; $display("t=%0d: q1=%b expected %b", t, q1, hist[hist.size()-1]);
      end
      d = 1'($urandom);
      hist.push_back(d);
    end
    d = 1'b1;
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0; d = 1'b0;
    #1 checks++;
    if (q34 !== 1'b0 || q1 !== 1'b0) begin failures++; $display("reset did not clear the line"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
