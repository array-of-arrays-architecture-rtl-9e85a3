// Carry-save adder stage: a row of W independent full adders.
//
// Three W-bit vectors x, y, z are reduced to a sum vector s (bit i has
// weight 2^i) and a carry vector c (bit i has weight 2^(i+1)), so that
// x + y + z = s + 2*c exactly. The caller shifts c when it feeds it on.
// No carry propagates along the row, which is what makes the stage fast.
// Purely combinational.
module csa_row #(
  parameter int unsigned W = 106
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  always_comb begin
    s = x ^ y ^ z;
    c = (x & y) | (x & z) | (y & z);
  end

endmodule
