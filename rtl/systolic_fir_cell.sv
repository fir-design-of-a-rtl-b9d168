// systolic_fir_cell: one tap cell of the bit-level systolic FIR filter.
//
// The word-level systolic cell (multiply x by the tap's coefficient, add to
// the passing partial sum) with both operations at bit level: a systolic
// multiplier forms f*x bit-serially, and a bit-serial full adder adds it to the
// partial-sum stream y_in arriving from the right. The adder's carry is kept
// for two clocks because two sequences are interleaved bit by bit.
//
//   x_in  -> x_out: x delayed M clocks (through the multiplier's sub-cells)
//   y_out = y_in + f*x, bit-serial; combinational from y_in and from the
//           registered product bit, so the cell adds no y delay of its own
//
// Structure follows the document's drawing of the cell; the inter-cell
// shift registers are in rsb_systolic_fir.
module systolic_fir_cell #(
  parameter int unsigned M = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [M-1:0] f,
  input  logic         x_in,
  output logic         x_out,
  input  logic         y_in,
  output logic         y_out
);

  logic prod;

  systolic_mult #(.M(M)) u_mult (
    .clk   (clk),
    .rst   (rst),
    .f     (f),
    .x_in  (x_in),
    .x_out (x_out),
    .p_out (prod)
  );

  serial_adder #(.CARRY_DELAY(2)) u_fa (
    .clk (clk),
    .rst (rst),
    .a   (prod),
    .b   (y_in),
    .s   (y_out)
  );

endmodule
