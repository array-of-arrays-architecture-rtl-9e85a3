// Carry-save sub-array of the array-of-arrays multiplier.
//
// The sub-array owns P adjacent partial products, global indices FIRST to
// FIRST+P-1. For each it has a Booth encoder and a row of Booth muxes, so
// the partial products are made where they are added. The rows are summed
// by a cascade of P-2 carry-save stages: the first stage adds three rows and
// every later stage adds one more row to the running sum and carry, so a
// sub-array of P rows has P-2 CSAs in its path.
//
// Row format (absolute bit positions in the 2N-bit product, N = 53):
//   row 0  : pp[N:0] at 0, then sign, sign, ~sign at N+1, N+2, N+3
//   row i>0: the previous row's sign at 2i-2, pp[N:0] at 2i,
//            ~sign at 2i+N+1, a constant 1 at 2i+N+2
// The leading {~sign, 1} (or {~s, s, s} on row 0) is the pre-added sign
// extension, and the sign bit of each row is added in the next row, in the
// free position below that row's partial product. The sign of the
// sub-array's last row leaves on sign_out and enters the next sub-array's
// first row on sign_in. Bits above 2N-1 are dropped: the product is taken
// modulo 2^(2N).
//
// The sub-array works in a local frame from absolute bit BASE (0 for the
// first sub-array, otherwise 2*FIRST-2, the position of its incoming sign
// bit) up to TOP, one place above the leading 1 of its last row (capped at
// 2N). Its outputs sum and carry are W = TOP-BASE bits wide; for N = 53 that
// is 62, 64, 72 and 76 bits for the four sub-arrays of the default
// partition. In the datapath each stage hands its upper bits on shifted by
// two places and its two least significant result bits leave the array;
// here those bits are simply the low bits of the local vectors, which no
// later stage changes.
//
// No carry is ever lost at the top of the frame. Each stage's row ends two
// places above the partial sum before it, so the two top cells of a stage
// see only that row's {~sign, 1} bits and generate no carry. Hence
// sum + carry equals the exact sum of the sub-array's rows (including the
// sign bit it receives), as an integer, not just modulo 2^W (for the last
// sub-array, whose frame is capped at 2N, it is modulo 2^(2N)). The
// combining array relies on this.
//
// The partitioning into sub-arrays, Booth encoders and muxes inside each
// sub-array, the pre-added sign extension and the sign bit passed down to
// the next row and to the next sub-array follow the multiplier's
// specification; the two lowest cells of each stage, below the new row's
// partial product, are the extra cells that take in the previous row's sign
// bit. Writing every stage at the full frame width is this design's choice.
//
// Interface: a (multiplicand), bwin (multiplier bits b[2*FIRST-1] up to
// b[2*(FIRST+P)-1], zero beyond the operand), sign_in; sum, carry, sign_out.
// Purely combinational.
module aoa_subarray
  import aoa_pkg::*;
#(
  parameter int unsigned N     = MANT_W,
  parameter int unsigned P     = 11,
  parameter int unsigned FIRST = 16,
  localparam int unsigned PW   = 2 * N,
  localparam int unsigned BASE = (FIRST == 0) ? 0 : 2 * FIRST - 2,
  // One above the leading 1 of the last row, capped at the product width.
  localparam int unsigned TOP  = (2 * (FIRST + P - 1) + N + 3 < PW) ?
                                 2 * (FIRST + P - 1) + N + 3 : PW,
  localparam int unsigned W    = TOP - BASE
) (
  input  logic [N-1:0] a,
  input  logic [2*P:0] bwin,
  input  logic         sign_in,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry,
  output logic         sign_out
);

  if (P < 3) begin : g_bad_p
    $error("aoa_subarray: P must be at least 3 (first CSA stage adds three rows)");
  end

  booth_ctl_t     ctl  [P];
  logic [N:0]     pp   [P];
  logic [P-1:0]   sgn;
  logic [W-1:0]   row  [P];

  for (genvar k = 0; k < P; k++) begin : g_row
    booth_encoder u_enc (.win(bwin[2*k +: 3]), .ctl(ctl[k]));
    booth_mux #(.N(N)) u_mux (.a(a), .ctl(ctl[k]), .pp(pp[k]), .sign(sgn[k]));

    // Place the row in the product and move it into the local frame.
    logic [PW+2:0] abs_row;

    if (FIRST + k == 0) begin : g_first_row
      always_comb begin
        abs_row      = '0;
        abs_row[N:0] = pp[k];
        abs_row[N+1] = sgn[k];
        abs_row[N+2] = sgn[k];
        abs_row[N+3] = !sgn[k];
      end
    end else begin : g_other_row
      // Sign bit of the row below: from the previous sub-array for k = 0.
      logic prev_sign;
      assign prev_sign = (k == 0) ? sign_in : sgn[(k == 0) ? 0 : k-1];
      always_comb begin
        abs_row                     = '0;
        abs_row[2*(FIRST+k)-2]      = prev_sign;
        abs_row[2*(FIRST+k) +: N+1] = pp[k];
        abs_row[2*(FIRST+k)+N+1]    = !sgn[k];
        abs_row[2*(FIRST+k)+N+2]    = 1'b1;
      end
    end
    assign row[k] = abs_row[BASE +: W];
  end

  // Cascade of carry-save stages.
  logic [W-1:0] st_s [P-2];
  logic [W-1:0] st_c [P-2];

  csa_row #(.W(W)) u_csa0 (.x(row[0]), .y(row[1]), .z(row[2]), .s(st_s[0]), .c(st_c[0]));

  for (genvar k = 1; k < P - 2; k++) begin : g_stage
    csa_row #(.W(W)) u_csa (
      .x(st_s[k-1]),
      .y({st_c[k-1][W-2:0], 1'b0}),
      .z(row[k+2]),
      .s(st_s[k]),
      .c(st_c[k])
    );
  end

  assign sum      = st_s[P-3];
  assign carry    = {st_c[P-3][W-2:0], 1'b0};
  assign sign_out = sgn[P-1];

endmodule
