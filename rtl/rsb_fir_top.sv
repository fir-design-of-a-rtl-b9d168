// rsb_fir_top: the two bit-level FIR filters side by side.
//
// Holds one bit-level transposed filter (rsb_transposed_fir) and one
// bit-level super-systolic filter (rsb_systolic_fir), both L taps of unsigned
// N-bit samples and M-bit coefficients with K guard bits. They share clock,
// reset and the coefficient inputs and are otherwise independent; each has
// its own 1-bit input and output.
//
//   tf_x_in / tf_y_out: transposed filter; one sample per W = N+M+K clocks,
//                       y(n) in the same clocks as x(n)
//   sf_x_in / sf_y_out: systolic filter; two sequences interleaved bit by
//                       bit, one sample of each per 2W clocks, output one
//                       clock behind the input
// See the two filter modules for the exact bit timing.
module rsb_fir_top
  import rsb_fir_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned M = 16,
  parameter int unsigned L = 4,
  parameter int unsigned K = guard_bits(L)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [L-1:0][M-1:0] coef,
  input  logic                tf_x_in,
  output logic                tf_y_out,
  input  logic                sf_x_in,
  output logic                sf_y_out
);

  rsb_transposed_fir #(.N(N), .M(M), .L(L), .K(K)) u_transposed (
    .clk   (clk),
    .rst   (rst),
    .coef  (coef),
    .x_in  (tf_x_in),
    .y_out (tf_y_out)
  );

  rsb_systolic_fir #(.N(N), .M(M), .L(L), .K(K)) u_systolic (
    .clk   (clk),
    .rst   (rst),
    .coef  (coef),
    .x_in  (sf_x_in),
    .y_out (sf_y_out)
  );

endmodule
