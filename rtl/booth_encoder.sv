// Radix-4 modified Booth encoder, one per partial product row.
//
// The 3-bit window {b[2i+1], b[2i], b[2i-1]} of the multiplier is recoded
// into the digit d = -2*b[2i+1] + b[2i] + b[2i-1], which lies in -2..+2.
// The encoder drives the select lines of the row's Booth multiplexers:
// 'one' selects the multiplicand A, 'two' selects 2A, and 'neg' inverts the
// selected value and marks the row negative (its sign bit is later added as
// the +1 of the two's complement). Windows 000 and 111 both give a zero row
// with neg cleared, so a zero row never contributes a sign bit.
//
// Purely combinational. Using Booth recoding to get 27 partial products
// follows the multiplier's specification; the exact select encoding is this
// design's choice.
module booth_encoder
  import aoa_pkg::*;
(
  input  logic [2:0]  win,  // {b[2i+1], b[2i], b[2i-1]}
  output booth_ctl_t  ctl
);

  always_comb begin
    ctl.one = win[1] ^ win[0];
    ctl.two = (win == 3'b100) || (win == 3'b011);
    ctl.neg = win[2] && !(win[1] && win[0]);
  end

endmodule
