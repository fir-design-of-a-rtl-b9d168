// rsb_fir_pkg: types and helpers shared by the bit-serial FIR filters.
//
// Both filters are built from one primitive, a one-bit full adder whose carry
// is kept in a register and fed back to the next bit of the same stream. The
// package gives that adder as a function returning a sum/carry pair, and the
// number of guard bits K = ceil(log2 L) that an L-tap sum needs on top of an
// N x M bit product (the filter word is N+M+K bits long).
package rsb_fir_pkg;

  typedef struct packed {
    logic carry;
    logic sum;
  } fa_t;

  // One-bit full adder.
  function automatic fa_t full_add(input logic a, input logic b, input logic c);
    fa_t r;
    r.sum   = a ^ b ^ c;
    r.carry = (a & b) | (a & c) | (b & c);
    return r;
  endfunction

  // Guard bits for an L-term sum: K = log2 L, rounded up for L not a power of two.
  function automatic int unsigned guard_bits(input int unsigned taps);
    return (taps <= 1) ? 0 : $clog2(taps);
  endfunction

endpackage
