// Shared constants and types of the array-of-arrays mantissa multiplier.
//
// The multiplier takes two 53-bit unsigned mantissas (IEEE double precision,
// hidden bit included), recodes the multiplier with radix-4 modified Booth
// encoding into 27 partial products of 54 bits, and reduces them in four
// carry-save sub-arrays whose outputs are merged by a chain of 4-2
// compressors. The numbers here (53, 54, 27, 106) follow from the IEEE
// double format; the Booth control encoding is this design's own.
package aoa_pkg;

  // Mantissa width, hidden bit included.
  localparam int unsigned MANT_W = 53;

  // Booth controls of one partial product row: select A (one), select 2A
  // (two), invert and add a sign bit (neg). one and two are never both set.
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_ctl_t;

  // Number of radix-4 Booth partial products for an N-bit unsigned
  // multiplier: the top digit must see a zero above the MSB.
  function automatic int unsigned num_pp(int unsigned n);
    return (n + 2) / 2;
  endfunction

endpackage
