// tb_sys_mult_cell: self-checking test of one systolic-multiplier sub-cell.
//
// Drives random x_in, p_in and coefficient bits and compares x_out and p_out
// every clock with a reference kept here: x_out is x_in one clock late, and
// p_out is the sum bit of (x_in & f_bit) + p_in + carry, one clock late, where
// the carry is the carry out of two clocks earlier. A reset in mid-run must
// clear both outputs and the stored carries.
module tb_sys_mult_cell;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic f_bit, x_in, x_out, p_in, p_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sys_mult_cell dut (.clk(clk), .rst(rst), .f_bit(f_bit), .x_in(x_in), .x_out(x_out),
                     .p_in(p_in), .p_out(p_out));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic c1, c2, exp_x, exp_p, a, s, co;
    f_bit = 0; x_in = 0; p_in = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    c1 = 0; c2 = 0; exp_x = 0; exp_p = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      #1;
      checks++;
      if (x_out !== exp_x || p_out !== exp_p) begin
        failures++;
        $display("t=%0d: x_out=%b p_out=%b, expected %b %b", t, x_out, p_out, exp_x, exp_p);
      end
      if (t == 600) begin
        rst = 1'b1;
        @(negedge clk);
        rst = 1'b0;
        #1 checks++;
        if (x_out !== 1'b0 || p_out !== 1'b0) begin failures++; $display("reset did not clear"); end
        c1 = 0; c2 = 0; exp_x = 0; exp_p = 0;
      end
      x_in = 1'($urandom); p_in = 1'($urandom);
      if (t % 50 == 0) f_bit = 1'($urandom);
      a = x_in & f_bit;
      s = a ^ p_in ^ c2;
      co = (a & p_in) | (a & c2) | (p_in & c2);
      exp_x = x_in; exp_p = s;
      c2 = c1; c1 = co;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
