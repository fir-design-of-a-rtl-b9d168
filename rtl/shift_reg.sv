// shift_reg: one-bit wide delay line of DEPTH flip-flops.
//
// q is d delayed by exactly DEPTH clocks. In the transposed filter it is the
// word delay z^-1, N+M+K clocks long (the default, 34, is N=M=16 and K=2);
// in the systolic filter it delays the x and y streams between cells.
// Synchronous, active-high reset clears the line.
module shift_reg #(
  parameter int unsigned DEPTH = 34
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);

  logic [DEPTH-1:0] line_q;

  always_ff @(posedge clk) begin
    if (rst) line_q <= '0;
    else line_q <= (line_q << 1) | DEPTH'(d);
  end

  assign q = line_q[DEPTH-1];

  initial assert (DEPTH >= 1) else $error("shift_reg: DEPTH must be at least 1");

endmodule
