// 4-to-2 compressor built as a two-stage carry-save array.
//
// The first CSA row adds a, b and c; the second adds its sum, d, and its
// carries moved up one place, with cin filling the free lowest carry slot.
// The result is a carry-save pair: sum (weight 2^i) and carry (weight
// 2^(i+1)). The first row's carry out of the top cell leaves as cout
// (weight 2^W). Exactly:
//   a + b + c + d + cin = sum + 2*carry + 2^W * cout.
// No carry ripples from cell to cell, so the delay is two full adders
// whatever W is. Purely combinational. Building the 4-2 compressor from two
// CSA stages follows the multiplier's specification; the cin/cout pins are
// this design's way of joining two compressors that meet at a bit boundary.
module compressor42 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry,
  output logic         cout
);

  logic [W-1:0] s1, c1, c1_up;

  csa_row #(.W(W)) u_row1 (.x(a),  .y(b), .z(c),     .s(s1),  .c(c1));

  if (W > 1) begin : g_up
    assign c1_up = {c1[W-2:0], cin};
  end else begin : g_up1
    assign c1_up = cin;
  end

  csa_row #(.W(W)) u_row2 (.x(s1), .y(d), .z(c1_up), .s(sum), .c(carry));

  assign cout = c1[W-1];

endmodule
