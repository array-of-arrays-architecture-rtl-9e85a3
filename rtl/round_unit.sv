// Final carry-propagate addition and IEEE round-to-nearest-even of the
// 2N-bit carry-save product (N = 53).
//
// Product layout for normalised inputs (product in [2^(2N-2), 2^(2N))):
// bit 2N-1 is the overflow bit; if it is 0 the mantissa is bits 2N-2..N-1,
// the round bit is bit N-2 and the sticky bit is the OR of bits N-3..0; if
// it is 1 everything moves up one place.
//
// The N-2 least significant bits (51 for N = 53) are added first in their
// own carry-propagate adder, which yields a carry into the upper part and
// the sticky bit of those bits. The upper N+2 bits are then added with that
// carry, giving the overflow bit, the mantissa candidate and the round bit.
// Round to nearest even increments the mantissa when the round bit is set
// and either a lower bit or the mantissa's LSB is set. If the increment
// carries out of the mantissa (all ones rounding up) the result is
// 1.000...0 and the overflow output is raised, because the value has
// reached the next binade.
//
// Outputs: mant (N bits, hidden bit included) and ovf, meaning the rounded
// product is mant * 2^(N) if ovf else mant * 2^(N-1) (in units of the
// product LSB); ovf is the exponent increment used to normalise.
// Purely combinational.
//
// The bit roles (overflow, 53 result bits, round bit, 51-bit low adder
// producing a carry and a sticky bit, round to nearest even) follow the
// multiplier's specification; the rounding itself is written here as a
// plain increment after the upper addition rather than as a dedicated
// rounding adder.
module round_unit
  import aoa_pkg::*;
#(
  parameter int unsigned N  = MANT_W,
  localparam int unsigned PW = 2 * N,
  localparam int unsigned L  = N - 2
) (
  input  logic [PW-1:0] cs_sum,
  input  logic [PW-1:0] cs_carry,
  output logic [N-1:0]  mant,
  output logic          ovf
);

  logic [L:0]     lo;      // low sum with its carry out
  logic           st_lo;
  logic [N+1:0]   hi;      // overflow bit, N mantissa bits and round bit
  logic [N-1:0]   m_pre;
  logic           rnd, st, inc;
  logic [N:0]     m_inc;

  always_comb begin
    lo    = {1'b0, cs_sum[L-1:0]} + {1'b0, cs_carry[L-1:0]};
    st_lo = |lo[L-1:0];
    hi    = cs_sum[PW-1:L] + cs_carry[PW-1:L] + {{(N+1){1'b0}}, lo[L]};

    if (hi[N+1]) begin
      m_pre = hi[N+1:2];
      rnd   = hi[1];
      st    = hi[0] | st_lo;
    end else begin
      m_pre = hi[N:1];
      rnd   = hi[0];
      st    = st_lo;
    end

    inc   = rnd & (st | m_pre[0]);
    m_inc = {1'b0, m_pre} + {{N{1'b0}}, inc};

    if (m_inc[N]) begin
      mant = {1'b1, {(N-1){1'b0}}};
      ovf  = 1'b1;
    end else begin
      mant = m_inc[N-1:0];
      ovf  = hi[N+1];
    end
  end

endmodule
