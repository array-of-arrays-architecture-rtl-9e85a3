// Booth multiplexer row: one mux cell per partial product bit.
//
// From the multiplicand A (N bits) and the row's Booth controls it forms the
// (N+1)-bit magnitude 0, A or 2A and inverts it when the digit is negative.
// A negative row is thus delivered in ones' complement; the missing +1 is
// the row's sign bit, which the carry-save array adds at the row's least
// significant position (in the next row, see aoa_subarray).
//
// Interface: a (N bits), ctl (from booth_encoder) in; pp (N+1 bits) and
// sign out. Purely combinational. The N+1 width and ones' complement plus
// sign-bit negation follow the multiplier's specification.
module booth_mux
  import aoa_pkg::*;
#(
  parameter int unsigned N = MANT_W
) (
  input  logic [N-1:0] a,
  input  booth_ctl_t   ctl,
  output logic [N:0]   pp,
  output logic         sign
);

  logic [N:0] mag;

  always_comb begin
    // Each bit j picks a[j] (one) or a[j-1] (two).
    for (int j = 0; j <= N; j++) begin
      mag[j] = (ctl.one && j < N && a[j]) || (ctl.two && j > 0 && a[j-1]);
    end
    pp   = ctl.neg ? ~mag : mag;
    sign = ctl.neg;
  end

endmodule
