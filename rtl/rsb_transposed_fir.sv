// rsb_transposed_fir: recursive structure-based bit-level transposed FIR filter.
//
// Computes y(n) = sum_{i=0}^{L-1} f(i) x(n-i) on unsigned N-bit samples and
// M-bit coefficients, with one 1-bit input and one 1-bit output. The word-level
// transposed form (products of the current sample, added into a chain of
// delayed partial sums) is kept, and each part is replaced by its bit-level
// counterpart:
//   * each multiplier f(i)*x is a convolution-carrying multiplier, which is
//     itself the transposed structure at bit level (conv_carry_mult);
//   * each word adder is a bit-serial full adder with carry feedback;
//   * each word delay z^-1 is a shift register of W = N+M+K bits, one word
//     slot, with K = log2 L guard bits.
// The product of f(L-1) enters the first shift register; tap i (L-2 >= i >= 0)
// adds its product to the delayed partial sum; the adder of tap 0 drives y_out.
//
// Timing: a word slot is W clocks. x_in carries x(n) in slot n, least
// significant bit first, N data bits then M+K zeros. y_out carries y(n) in the
// same slot, all W bits, least significant first, bit k in the same clock as
// slot bit k (the path x_in -> AND -> two full adders -> y_out is
// combinational). Slots follow each other with no gap; since every partial sum
// fits in W bits, all carries are zero at a slot boundary.
// Structure and delay lengths follow the document. Coefficients are parallel
// inputs that must stay constant while data is in flight, and the synchronous
// active-high reset are this design's choices.
module rsb_transposed_fir
  import rsb_fir_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned M = 16,
  parameter int unsigned L = 4,
  parameter int unsigned K = guard_bits(L)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [L-1:0][M-1:0] coef,
  input  logic               x_in,
  output logic               y_out
);

  localparam int unsigned W = N + M + K;

  logic [L-1:0] prod;   // bit-serial product f(i)*x of every tap
  logic [L-1:0] acc;    // partial-sum stream leaving tap i (tap L-1: product alone)
  logic [L-1:1] acc_d;  // acc[i] delayed by one word slot

  for (genvar i = 0; i < L; i++) begin : g_tap
    conv_carry_mult #(.M(M)) u_mult (
      .clk   (clk),
      .rst   (rst),
      .f     (coef[i]),
      .x_in  (x_in),
      .p_out (prod[i])
    );
  end

  assign acc[L-1] = prod[L-1];

  for (genvar i = 0; i < L - 1; i++) begin : g_acc
    shift_reg #(.DEPTH(W)) u_delay (
      .clk (clk),
      .rst (rst),
      .d   (acc[i+1]),
      .q   (acc_d[i+1])
    );
    serial_adder #(.CARRY_DELAY(1)) u_fa (
      .clk (clk),
      .rst (rst),
      .a   (prod[i]),
      .b   (acc_d[i+1]),
      .s   (acc[i])
    );
  end

  assign y_out = acc[0];

  initial assert (L >= 2) else $error("rsb_transposed_fir: L must be at least 2");

endmodule
