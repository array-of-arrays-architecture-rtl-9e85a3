// Combining array of the array-of-arrays multiplier (8-to-2 reduction).
//
// Four sub-arrays hand in four carry-save pairs (s_j, c_j), given here at
// their absolute positions in the 2N-bit product. Sub-array j starts at bit
// BASE_j = 2*FIRST_j-2; below the boundary BOUND_j = BASE_{j+1} its bits are
// final ("fall off" the datapath) once the next sub-array begins.
//
//   compressor 1 (datapath): s1,c1,s2,c2   over bits [BOUND2, E1)   -> x1
//   compressor 2 (datapath): x1,  s3,c3    over bits [BOUND3, E2)   -> x2
//   compressor 3 (datapath): x2,  s4,c4    over bits [BOUND4, 2N)   -> high
//   compressor 4 (on top)  : the fallen-off low bits, one 4-2 compressor
//       [BOUND1, BOUND2): s1,c1,s2,c2
//       [BOUND2, BOUND3): x1,    s3,c3
//       [BOUND3, BOUND4): x2,    s4,c4                              -> low
//   bits [0, BOUND1) of sub-array 1 need no addition and pass straight on.
//
// BOUND4 = 2*(NUM_PP-1) = 52 for N = 53, so compressor 3 delivers the 54
// most significant product bits. E1 and E2 lie two places above the
// leading 1 of the last row of sub-array 2 and 3 (bits 71 and 87 for the
// default partition), so compressors 1 and 2 are 57 bits wide. This needs
// the inputs as the sub-arrays deliver them: each pair sums exactly to its
// rows' value, and the running sum of sub-arrays 1..j is then below
// 2^(E_j), so no carry leaves the top of compressors 1 and 2.
//
// The two carries compressor 4 produces at weight 2^BOUND4 (its cout and the carry of its top cell) enter compressor
// 3 through its carry-in and through the empty lowest slot of its carry
// vector, so no carry-propagate step is needed at the seam. Carries out of
// bit 2N-1 are dropped (the product is taken modulo 2^(2N)).
//
// Output: sum + carry = s1+c1+...+s4+c4 (mod 2^(2N)) under that
// condition, the product in carry-save form. Purely combinational; the critical path is three
// compressors in the datapath chain. The compressor arrangement (1-3 along
// the datapath, 4 on top) follows the multiplier's specification; feeding
// compressor 4's top carries into compressor 3 is this design's choice.
module aoa_combiner
  import aoa_pkg::*;
#(
  parameter int unsigned N  = MANT_W,
  parameter int unsigned P1 = 4,
  parameter int unsigned P2 = 4,
  parameter int unsigned P3 = 8,
  localparam int unsigned PW = 2 * N,
  localparam int unsigned NPP = num_pp(N),
  localparam int unsigned B1 = 2 * P1 - 2,
  localparam int unsigned B2 = 2 * (P1 + P2) - 2,
  localparam int unsigned B3 = 2 * (P1 + P2 + P3) - 2,
  localparam int unsigned B4 = 2 * NPP - 2,
  // Upper ends of compressors 1 and 2: two places above the leading 1 of
  // the last row of sub-array 2 (resp. 3), capped at the product width.
  localparam int unsigned E1 = (2 * (P1 + P2 - 1) + N + 4 < PW) ?
                               2 * (P1 + P2 - 1) + N + 4 : PW,
  localparam int unsigned E2 = (2 * (P1 + P2 + P3 - 1) + N + 4 < PW) ?
                               2 * (P1 + P2 + P3 - 1) + N + 4 : PW,
  localparam int unsigned W1 = E1 - B2,   // compressor 1
  localparam int unsigned W2 = E2 - B3,   // compressor 2
  localparam int unsigned W3 = PW - B4,   // compressor 3
  localparam int unsigned W4 = B4 - B1    // compressor 4
) (
  input  logic [PW-1:0] s1, c1,
  input  logic [PW-1:0] s2, c2,
  input  logic [PW-1:0] s3, c3,
  input  logic [PW-1:0] s4, c4,
  output logic [PW-1:0] sum,
  output logic [PW-1:0] carry
);

  // Compressor 1: upper bits of arrays 1 and 2.
  logic [W1-1:0] x1_s, x1_c;
  logic          x1_co;
  compressor42 #(.W(W1)) u_cmp1 (
    .a(s1[E1-1:B2]), .b(c1[E1-1:B2]), .c(s2[E1-1:B2]), .d(c2[E1-1:B2]),
    .cin(1'b0), .sum(x1_s), .carry(x1_c), .cout(x1_co)
  );
  logic [PW-1:0] x1s_abs, x1c_abs;
  assign x1s_abs = PW'({x1_s, {B2{1'b0}}});
  assign x1c_abs = PW'({x1_c[W1-2:0], 1'b0, {B2{1'b0}}});

  // Compressor 2: combined arrays 1+2 with array 3.
  logic [W2-1:0] x2_s, x2_c;
  logic          x2_co;
  compressor42 #(.W(W2)) u_cmp2 (
    .a(x1s_abs[E2-1:B3]), .b(x1c_abs[E2-1:B3]), .c(s3[E2-1:B3]), .d(c3[E2-1:B3]),
    .cin(1'b0), .sum(x2_s), .carry(x2_c), .cout(x2_co)
  );
  logic [PW-1:0] x2s_abs, x2c_abs;
  assign x2s_abs = PW'({x2_s, {B3{1'b0}}});
  assign x2c_abs = PW'({x2_c[W2-2:0], 1'b0, {B3{1'b0}}});

  // Compressor 4 (top): the bits that fell off above arrays 2, 3 and 4.
  logic [W4-1:0] t_a, t_b, t_c, t_d;
  always_comb begin
    for (int i = 0; i < int'(W4); i++) begin
      if (i + B1 < B2) begin
        t_a[i] = s1[i+B1];      t_b[i] = c1[i+B1];
        t_c[i] = s2[i+B1];      t_d[i] = c2[i+B1];
      end else if (i + B1 < B3) begin
        t_a[i] = x1s_abs[i+B1]; t_b[i] = x1c_abs[i+B1];
        t_c[i] = s3[i+B1];      t_d[i] = c3[i+B1];
      end else begin
        t_a[i] = x2s_abs[i+B1]; t_b[i] = x2c_abs[i+B1];
        t_c[i] = s4[i+B1];      t_d[i] = c4[i+B1];
      end
    end
  end

  logic [W4-1:0] lo_s, lo_c;
  logic          lo_co;
  compressor42 #(.W(W4)) u_cmp4 (
    .a(t_a), .b(t_b), .c(t_c), .d(t_d),
    .cin(1'b0), .sum(lo_s), .carry(lo_c), .cout(lo_co)
  );

  // Compressor 3: combined arrays 1-3 with array 4, plus the two carries
  // compressor 4 hands up at the seam.
  logic [W3-1:0] hi_s, hi_c;
  logic          hi_co;
  compressor42 #(.W(W3)) u_cmp3 (
    .a(x2s_abs[PW-1:B4]), .b(x2c_abs[PW-1:B4]), .c(s4[PW-1:B4]), .d(c4[PW-1:B4]),
    .cin(lo_co), .sum(hi_s), .carry(hi_c), .cout(hi_co)
  );

  assign sum   = {hi_s, lo_s, s1[B1-1:0]};
  assign carry = {hi_c[W3-2:0], lo_c[W4-1], lo_c[W4-2:0], 1'b0, c1[B1-1:0]};

endmodule
