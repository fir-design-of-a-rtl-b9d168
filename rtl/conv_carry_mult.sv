// conv_carry_mult: convolution-carrying multiplier (bit-serial x, parallel coefficient).
//
// Multiplication is a convolution of the bit strings of the two operands
// followed by carrying. This module computes that convolution with the
// transposed FIR structure applied at bit level: x_in is broadcast to M AND
// gates, one per coefficient bit f[j]; the AND of the top bit f[M-1] enters a
// one-clock delay, and every following stage j adds its AND term to the
// delayed partial sum in a bit-serial full adder whose carry returns on the
// next clock (the carrying). The adder of stage 0 gives the product.
//
//   x_in:  X, least significant bit first, one bit per clock
//   p_out: P = F * X, least significant bit first; bit k appears in the same
//          clock as x bit k (combinational path x_in -> AND -> adder -> p_out)
//
// X must be followed by at least M zero bits for the top product bits to
// come out; after N+M clocks all internal state is zero again, so words can
// follow each other without a reset. The structure (AND row, one-bit delays,
// full adders with carry feedback) is the document's; operands are unsigned.
module conv_carry_mult #(
  parameter int unsigned M = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [M-1:0] f,
  input  logic         x_in,
  output logic         p_out
);

  // part[j]: partial-sum stream leaving stage j (stage M-1 is the AND alone)
  logic [M-1:0] part;
  logic [M-1:1] part_q;   // one-clock delays between stages

  assign part[M-1] = x_in & f[M-1];

  for (genvar j = 0; j < M - 1; j++) begin : g_stage
    serial_adder #(.CARRY_DELAY(1)) u_fa (
      .clk (clk),
      .rst (rst),
      .a   (x_in & f[j]),
      .b   (part_q[j+1]),
      .s   (part[j])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) part_q <= '0;
    else part_q <= part[M-1:1];
  end

  assign p_out = part[0];

  initial assert (M >= 2) else $error("conv_carry_mult: M must be at least 2");

endmodule
