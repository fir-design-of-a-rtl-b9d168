// serial_adder: bit-serial full adder with a fed-back carry.
//
// Adds two bit streams that arrive least significant bit first. The sum bit is
// combinational from a, b and the stored carry; the carry out is written into
// a chain of CARRY_DELAY flip-flops and comes back as the carry in
// CARRY_DELAY clocks later, i.e. at the next bit of the same stream.
// CARRY_DELAY = 1 is the adder of the transposed filter and of the
// convolution-carrying multiplier, where one stream occupies every clock.
// CARRY_DELAY = 2 is used in the systolic filter, where two streams are
// interleaved bit by bit and each stream's carry must skip the other stream's
// bit. The adder itself and its carry feedback register follow the document's
// figures; the two-clock carry delay is this design's reading of the
// interleaved data flow. Reset (synchronous, active high) clears the carries.
module serial_adder
  import rsb_fir_pkg::*;
#(
  parameter int unsigned CARRY_DELAY = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic s
);

  logic [CARRY_DELAY-1:0] carry_q;
  fa_t fa;

  always_comb fa = full_add(a, b, carry_q[CARRY_DELAY-1]);
  assign s = fa.sum;

  always_ff @(posedge clk) begin
    if (rst) carry_q <= '0;
    else carry_q <= (carry_q << 1) | CARRY_DELAY'(fa.carry);
  end

  initial assert (CARRY_DELAY >= 1) else $error("serial_adder: CARRY_DELAY must be at least 1");

endmodule
