// tb_serial_adder: self-checking test of the bit-serial full adder.
//
// Instance u1 (carry delay 1) adds random 20-bit numbers sent least
// significant bit first, 21 bits per word, back to back without reset; the
// collected sum bits must equal a + b. Instance u2 (carry delay 2) gets two
// pairs of numbers interleaved bit by bit and must return both sums, which
// shows that the carries of the two interleaved streams stay apart.
// Inputs change on the falling edge; outputs are sampled 1 time unit later.
module tb_serial_adder;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic a1, b1, s1, a2, b2, s2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_adder #(.CARRY_DELAY(1)) u1 (.clk(clk), .rst(rst), .a(a1), .b(b1), .s(s1));
  serial_adder #(.CARRY_DELAY(2)) u2 (.clk(clk), .rst(rst), .a(a2), .b(b2), .s(s2));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_sum(input string what, input logic [19:0] x, input logic [19:0] y,
                           input logic [20:0] got);
    checks++;
    if (got !== 21'(x) + 21'(y)) begin
      failures++;
      $display("%s: %h + %h gave %h", what, x, y, got);
    end
  endtask

  initial begin
    logic [19:0] xa, xb, ya, yb, za, zb;
    logic [20:0] got1a, got1b, got2a, got2b;
    a1 = 0; b1 = 0; a2 = 0; b2 = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int w = 0; w < 100; w++) begin
      xa = 20'($urandom); xb = 20'($urandom);
      ya = 20'($urandom); yb = 20'($urandom);
      za = 20'($urandom); zb = 20'($urandom);
      if (w == 0) begin xa = '1; xb = 20'd1; ya = '1; yb = '1; za = '1; zb = '1; end
      // u1: idle for 42 clocks, then words z and y back to back.
      // u2: words x and y interleaved over the same 42 clocks.
      for (int k = 0; k < 21; k++) begin
        @(negedge clk);
        a1 = 1'b0; b1 = 1'b0;
        a2 = (k < 20) ? xa[k] : 1'b0; b2 = (k < 20) ? xb[k] : 1'b0;
        #1 got2a[k] = s2;
        @(negedge clk);
        a2 = (k < 20) ? ya[k] : 1'b0; b2 = (k < 20) ? yb[k] : 1'b0;
        a1 = 1'b0; b1 = 1'b0;
        #1 got2b[k] = s2;
      end
      for (int k = 0; k < 21; k++) begin
        @(negedge clk);
        a1 = (k < 20) ? za[k] : 1'b0; b1 = (k < 20) ? zb[k] : 1'b0;
        a2 = 1'b0; b2 = 1'b0;
        #1 got1b[k] = s1;
      end
      for (int k = 0; k < 21; k++) begin
        @(negedge clk);
        a1 = (k < 20) ? ya[k] : 1'b0; b1 = (k < 20) ? yb[k] : 1'b0;
        #1 got1a[k] = s1;
      end
      check_sum("u1 second dense word", ya, yb, got1a);
      check_sum("u1 dense word", za, zb, got1b);
      check_sum("u2 stream 1", xa, xb, got2a);
      check_sum("u2 stream 2", ya, yb, got2b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
