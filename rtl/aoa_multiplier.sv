// Array-of-arrays mantissa multiplier for IEEE double precision (53 x 53).
//
// The 27 radix-4 Booth partial products of the 53-bit mantissa product are
// split into four groups of adjacent rows, each summed by its own carry-save
// sub-array, and the four carry-save results are merged by a combining
// array of 4-2 compressors instead of a tree. With the default partition
// 4, 4, 8, 11 rows (2, 2, 6 and 9 CSA stages) the later, larger sub-arrays
// balance the long wires that carry the earlier results across them; the
// longest carry-save path is the 9 CSAs of sub-array 4 followed by
// compressor 3. The partition 5, 5, 7, 10 gives the variant that minimises
// CSA count instead (3 + 2+2+2 = 9 CSAs when wires are ignored).
//
//   a, b --> input latch --> 4 sub-arrays (Booth encoders + muxes + CSAs)
//        --> combining array (compressors 1-3 in the datapath, 4 on top)
//        --> output latch (106-bit carry-save product)
//        --> carry-propagate add and round to nearest even --> result reg
//
// Each sub-array passes the sign bit of its last row to the first row of
// the next one. Sub-array j sees the product from bit 2*FIRST_j-2 upward;
// here its outputs are shifted to absolute product positions, which is the
// diagonal route the earlier results take across the later arrays.
//
// Timing: fully pipelined, one multiplication may start every cycle.
//   cycle 0: in_valid with a and b
//   cycle 1: operands in the input latch; the carry-save product is formed
//            combinationally from them (the latch-to-latch path)
//   cycle 2: cs_valid, cs_sum and cs_carry hold the product in carry-save
//            form (cs_sum + cs_carry = a*b mod 2^106)
//   cycle 3: res_valid, mant (53 bits, rounded to nearest even) and ovf
// Reset (rst_n low, asynchronous) clears all latches and valid flags.
//
// The partition, the Booth recoding, the sign-bit passing, the compressor
// arrangement, the latches around the carry-save datapath and the rounding
// rules follow the multiplier's specification. The clocked pipeline with
// valid flags, the register after the rounding stage and the reset are this
// design's choices.
module aoa_multiplier
  import aoa_pkg::*;
#(
  parameter int unsigned N  = MANT_W,
  parameter int unsigned P1 = 4,
  parameter int unsigned P2 = 4,
  parameter int unsigned P3 = 8,
  parameter int unsigned P4 = 11
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           cs_valid,
  output logic [2*N-1:0] cs_sum,
  output logic [2*N-1:0] cs_carry,
  output logic           res_valid,
  output logic [N-1:0]   mant,
  output logic           ovf
);

  localparam int unsigned PW  = 2 * N;
  localparam int unsigned NPP = num_pp(N);
  localparam int unsigned F2  = P1;
  localparam int unsigned F3  = P1 + P2;
  localparam int unsigned F4  = P1 + P2 + P3;
  localparam int unsigned BS2 = 2 * F2 - 2;
  localparam int unsigned BS3 = 2 * F3 - 2;
  localparam int unsigned BS4 = 2 * F4 - 2;
  // Upper end of each sub-array's frame: one above its last row's leading 1.
  localparam int unsigned T1  = 2 * (F2 - 1) + N + 3;
  localparam int unsigned T2  = 2 * (F3 - 1) + N + 3;
  localparam int unsigned T3  = 2 * (F4 - 1) + N + 3;
  localparam int unsigned T4  = PW;

  if (P1 + P2 + P3 + P4 != NPP) begin : g_bad_partition
    $error("aoa_multiplier: P1+P2+P3+P4 must equal the number of Booth partial products");
  end

  // ---------------- input latch ----------------
  logic [N-1:0] a_q, b_q;
  logic         v1, v2, v3;

  mul_latch #(.W(2*N)) u_in_latch (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .d({a, b}), .q({a_q, b_q})
  );

  // Multiplier bits as seen by the Booth encoders: b[-1] = 0 at index 0,
  // zeros above the MSB.
  logic [2*NPP:0] bx;
  assign bx = {{(2*NPP-N){1'b0}}, b_q, 1'b0};

  // ---------------- sub-arrays ----------------
  logic [T1-1:0]     sa1, ca1;
  logic [T2-BS2-1:0] sa2, ca2;
  logic [T3-BS3-1:0] sa3, ca3;
  logic [T4-BS4-1:0] sa4, ca4;
  logic              sg1, sg2, sg3, sg4;

  aoa_subarray #(.N(N), .P(P1), .FIRST(0)) u_array1 (
    .a(a_q), .bwin(bx[0 +: 2*P1+1]), .sign_in(1'b0),
    .sum(sa1), .carry(ca1), .sign_out(sg1)
  );
  aoa_subarray #(.N(N), .P(P2), .FIRST(F2)) u_array2 (
    .a(a_q), .bwin(bx[2*F2 +: 2*P2+1]), .sign_in(sg1),
    .sum(sa2), .carry(ca2), .sign_out(sg2)
  );
  aoa_subarray #(.N(N), .P(P3), .FIRST(F3)) u_array3 (
    .a(a_q), .bwin(bx[2*F3 +: 2*P3+1]), .sign_in(sg2),
    .sum(sa3), .carry(ca3), .sign_out(sg3)
  );
  aoa_subarray #(.N(N), .P(P4), .FIRST(F4)) u_array4 (
    .a(a_q), .bwin(bx[2*F4 +: 2*P4+1]), .sign_in(sg3),
    .sum(sa4), .carry(ca4), .sign_out(sg4)
  );

  // The last Booth digit of an unsigned multiplier is never negative.
  always_comb begin
    if (v1) assert (!sg4) else $error("last partial product is negative");
  end

  // ---------------- combining array ----------------
  logic [PW-1:0] cmb_s, cmb_c;

  aoa_combiner #(.N(N), .P1(P1), .P2(P2), .P3(P3)) u_combiner (
    .s1(PW'(sa1)), .c1(PW'(ca1)),
    .s2(PW'({sa2, {BS2{1'b0}}})), .c2(PW'({ca2, {BS2{1'b0}}})),
    .s3(PW'({sa3, {BS3{1'b0}}})), .c3(PW'({ca3, {BS3{1'b0}}})),
    .s4({sa4, {BS4{1'b0}}}), .c4({ca4, {BS4{1'b0}}}),
    .sum(cmb_s), .carry(cmb_c)
  );

  // ---------------- output latch ----------------
  mul_latch #(.W(2*PW)) u_out_latch (
    .clk(clk), .rst_n(rst_n), .en(v1), .d({cmb_s, cmb_c}), .q({cs_sum, cs_carry})
  );

  // ---------------- final add and rounding ----------------
  logic [N-1:0] mant_d;
  logic         ovf_d;

  round_unit #(.N(N)) u_round (
    .cs_sum(cs_sum), .cs_carry(cs_carry), .mant(mant_d), .ovf(ovf_d)
  );

  mul_latch #(.W(N+1)) u_res_latch (
    .clk(clk), .rst_n(rst_n), .en(v2), .d({ovf_d, mant_d}), .q({ovf, mant})
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
    end
  end

  assign cs_valid  = v2;
  assign res_valid = v3;

endmodule
