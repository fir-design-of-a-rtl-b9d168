// rsb_systolic_fir: recursive structure-based bit-level systolic FIR filter.
//
// Computes y(n) = sum_{i=0}^{L-1} f(i) x(n-i) for two unsigned N-bit input
// sequences X1 and X2 at once, on one 1-bit input and one 1-bit output. The
// word-level systolic array (x moving right, y moving left, one multiply-add
// cell per tap) is kept, and every cell's multiplier is itself a systolic
// array at bit level (systolic_mult), which makes the whole a super-systolic
// array. A counter-flow array only uses every other clock for one sequence;
// the free clocks carry the second sequence, interleaved bit by bit.
//
// Between cell i and cell i+1 the x stream passes an N-bit shift register and
// the y stream a shift register of N+M+2K bits (2M+2K for the document's
// N = M). Together with the M clocks x spends in a cell's multiplier, x and
// y take 2W clocks, W = N+M+K, to go once around between two neighbouring
// cells: exactly one word-pair slot, so the product of x(n) in cell i lands
// in the partial sum of y(n+i).
//
// Timing (clocks counted from the start of word-pair slot n, 2W clocks long):
//   x_in  clock 2b   : bit b of x1(n)   clock 2b+1 : bit b of x2(n)
//         (b = 0..N-1; the remaining clocks of the slot must be 0)
//   y_out clock 2b+1 : bit b of y1(n)   clock 2b+2 : bit b of y2(n)
//         (b = 0..W-1; y2(n)'s last bit falls on clock 0 of slot n+1)
// The output lags the input by one clock; y_out is driven from registers and
// the adder of cell 0. The x output of the last cell is left unconnected, as
// nothing lies to the right of the last tap (lint reports it as unused).
// Cell structure and the N-bit x delay follow the document; the y delay is
// the document's 2M+2K written for unequal N and M. Coefficients are parallel
// inputs held constant; reset is synchronous and active high.
module rsb_systolic_fir
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
  input  logic                x_in,
  output logic                y_out
);

  localparam int unsigned XDELAY = N;
  localparam int unsigned YDELAY = N + M + 2 * K;

  logic [L-1:0] x_cell_in, x_cell_out;
  logic [L-1:0] y_cell_in, y_cell_out;

  assign x_cell_in[0]   = x_in;
  assign y_cell_in[L-1] = 1'b0;

  for (genvar i = 0; i < L; i++) begin : g_cell
    systolic_fir_cell #(.M(M)) u_cell (
      .clk   (clk),
      .rst   (rst),
      .f     (coef[i]),
      .x_in  (x_cell_in[i]),
      .x_out (x_cell_out[i]),
      .y_in  (y_cell_in[i]),
      .y_out (y_cell_out[i])
    );
  end

  for (genvar i = 0; i < L - 1; i++) begin : g_link
    shift_reg #(.DEPTH(XDELAY)) u_xdelay (
      .clk (clk),
      .rst (rst),
      .d   (x_cell_out[i]),
      .q   (x_cell_in[i+1])
    );
    shift_reg #(.DEPTH(YDELAY)) u_ydelay (
      .clk (clk),
      .rst (rst),
      .d   (y_cell_out[i+1]),
      .q   (y_cell_in[i])
    );
  end

  assign y_out = y_cell_out[0];

  initial assert (L >= 2) else $error("rsb_systolic_fir: L must be at least 2");

endmodule
