// sys_mult_cell: one sub-cell of the bit-level systolic multiplier.
//
// The x stream passes left to right and the partial-product stream right to
// left, each through one register per sub-cell. The sub-cell ANDs x_in with
// its coefficient bit f_bit, adds that bit to p_in and to its stored carry in
// a full adder, and registers the sum as p_out. The carry is kept for two
// clocks, because the x stream carries two interleaved sequences and the next
// bit of the same sequence arrives two clocks later.
//
//   x_out = x_in delayed one clock
//   p_out = sum(x_in & f_bit, p_in, carry) delayed one clock
//
// AND, full adder, carry feedback and the registers on x_out and p_out follow
// the document's drawing of the sub-cell; the two-clock carry is this design's
// reading of the interleaved flow. Synchronous active-high reset.
module sys_mult_cell (
  input  logic clk,
  input  logic rst,
  input  logic f_bit,
  input  logic x_in,
  output logic x_out,
  input  logic p_in,
  output logic p_out
);

  logic sum;

  serial_adder #(.CARRY_DELAY(2)) u_fa (
    .clk (clk),
    .rst (rst),
    .a   (x_in & f_bit),
    .b   (p_in),
    .s   (sum)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      x_out <= 1'b0;
      p_out <= 1'b0;
    end else begin
      x_out <= x_in;
      p_out <= sum;
    end
  end

endmodule
