// systolic_mult: bit-level systolic multiplier for two interleaved sequences.
//
// A linear array of M sub-cells (sys_mult_cell), sub-cell j holding
// coefficient bit f[j], with f[0] at the left end. The x bits enter sub-cell 0
// and move right one sub-cell per clock; partial-product bits enter sub-cell
// M-1 as zero and move left one sub-cell per clock. Bit i of X meets
// coefficient bit j at sub-cell j and its product bit reaches the left end
// 2(i+j)+1 clocks after x bit i entered, so the left end emits the
// convolution of the bit strings with carrying done by the sub-cell adders:
// the product F*X, least significant bit first, one bit every other clock.
// The other clock phase carries the second, independent sequence.
//
//   x_in:  x1_0 x2_0 x1_1 x2_1 ... (bit i of sequence s in clock 2i + s - 1)
//   p_out: bit k of F*X1 in clock 2k+1 after x1_0 entered, bit k of F*X2 one
//          clock later; registered
//   x_out: x_in delayed M clocks
//
// Each sequence must be followed by at least M zero bits so that its product
// completes before the next word. Structure follows the document's figure.
module systolic_mult #(
  parameter int unsigned M = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [M-1:0] f,
  input  logic         x_in,
  output logic         x_out,
  output logic         p_out
);

  logic [M:0] x_chain;   // x_chain[j]: x into sub-cell j
  logic [M:0] p_chain;   // p_chain[j]: p out of sub-cell j (p_chain[M] = 0)

  assign x_chain[0] = x_in;
  assign p_chain[M] = 1'b0;

  for (genvar j = 0; j < M; j++) begin : g_cell
    sys_mult_cell u_cell (
      .clk   (clk),
      .rst   (rst),
      .f_bit (f[j]),
      .x_in  (x_chain[j]),
      .x_out (x_chain[j+1]),
      .p_in  (p_chain[j+1]),
      .p_out (p_chain[j])
    );
  end

  assign x_out = x_chain[M];
  assign p_out = p_chain[0];

endmodule
