// End-to-end testbench of aoa_multiplier with the alternative partition
// 5, 5, 7, 10 rows (3, 3, 5, 8 CSAs), the one that minimises CSA count when
// wire delay is ignored. The checks are those of tb_aoa_multiplier.
//
// Operand pairs are streamed in, mostly back to back with occasional idle
// cycles. For each one the testbench checks, against values it computes
// itself from a*b with wide integer arithmetic:
//   * two cycles after in_valid: cs_valid, and cs_sum + cs_carry = a*b;
//   * three cycles after in_valid: res_valid, and mant/ovf equal a*b
//     rounded to 53 bits, nearest even, with ovf set for products >= 2^105
//     (or a rounding carry into that binade).
// It also counts how often the design's mechanisms were exercised and fails
// if one never was: negative Booth rows, a sign bit handed from each
// sub-array to the next, products with and without the overflow bit,
// rounding up, an exact tie rounded to even, a rounding carry out of the
// mantissa, idle cycles between operations, and operands with the hidden
// bit clear.
module tb_aoa_multiplier_aoa1;
  import aoa_pkg::*;

  localparam int unsigned N  = MANT_W;
  localparam int unsigned PW = 2 * N;
  localparam int NUM_OPS     = 2000;
  // Last Booth row of sub-arrays 1..3 in the 5, 5, 7, 10 partition.
  localparam int LAST1 = 4, LAST2 = 9, LAST3 = 16;

  logic          clk = 1'b0;
  logic          rst_n, in_valid;
  logic [N-1:0]  a, b;
  logic          cs_valid, res_valid, ovf;
  logic [PW-1:0] cs_sum, cs_carry;
  logic [N-1:0]  mant;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_neg = 0, n_sign1 = 0, n_sign2 = 0, n_sign3 = 0, n_ovf = 0, n_noovf = 0;
  int n_up = 0, n_tie_even = 0, n_carry_out = 0, n_idle = 0, n_denorm = 0;
  int n_cs = 0, n_res = 0;

  aoa_multiplier #(.P1(5), .P2(5), .P3(7), .P4(10)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .cs_valid(cs_valid), .cs_sum(cs_sum), .cs_carry(cs_carry),
    .res_valid(res_valid), .mant(mant), .ovf(ovf)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NUM_OPS * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [PW-1:0] prod;
    logic [N-1:0]  mant;
    logic          ovf;
    int            issue;
  } exp_t;

  exp_t cs_q[$];
  exp_t res_q[$];

  function automatic int digit(input logic [N-1:0] bv, input int i);
    logic hi, mid, lo;
    hi  = (2*i+1 < N) ? bv[2*i+1] : 1'b0;
    mid = (2*i < N)   ? bv[2*i]   : 1'b0;
    lo  = (i > 0)     ? bv[2*i-1] : 1'b0;
    return -2 * int'(hi) + int'(mid) + int'(lo);
  endfunction

  // Reference rounding of a product.
  function automatic exp_t reference(input logic [N-1:0] av, input logic [N-1:0] bv);
    exp_t e;
    int sh;
    logic [PW:0] q, rem, half;
    e.prod = PW'(av) * PW'(bv);
    sh   = e.prod[PW-1] ? N : N - 1;
    q    = (PW+1)'(e.prod) >> sh;
    rem  = (PW+1)'(e.prod) & (((PW+1)'(1) << sh) - 1'b1);
    half = (PW+1)'(1) << (sh - 1);
    e.ovf = e.prod[PW-1];
    if (rem > half || (rem == half && q[0])) q = q + 1'b1;
    if (q[N]) begin q = q >> 1; e.ovf = 1'b1; end
    e.mant = q[N-1:0];
    e.issue = 0;
    return e;
  endfunction

  // Coverage of the mechanisms an operand pair exercises.
  task automatic cover_op(input logic [N-1:0] av, input logic [N-1:0] bv);
    int sh;
    logic [PW-1:0] p;
    logic [PW:0] rem, half;
    logic [PW:0] q;
    for (int i = 0; i < num_pp(N); i++) if (digit(bv, i) < 0) begin n_neg++; break; end
    if (digit(bv, LAST1) < 0) n_sign1++;
    if (digit(bv, LAST2) < 0) n_sign2++;
    if (digit(bv, LAST3) < 0) n_sign3++;
    p = PW'(av) * PW'(bv);
    if (p[PW-1]) n_ovf++; else n_noovf++;
    sh   = p[PW-1] ? N : N - 1;
    q    = (PW+1)'(p) >> sh;
    rem  = (PW+1)'(p) & (((PW+1)'(1) << sh) - 1'b1);
    half = (PW+1)'(1) << (sh - 1);
    if (rem > half || (rem == half && q[0])) begin
      n_up++;
      if (&q[N-1:0]) n_carry_out++;
    end
    if (rem == half && !q[0] && p[PW-1:PW-2] != 0) n_tie_even++;
    if (!av[N-1] || !bv[N-1]) n_denorm++;
  endtask

  // Operand generator with directed corner cases.
  task automatic pick(input int t, output logic [N-1:0] av, output logic [N-1:0] bv);
    av = {1'b1, 52'({$urandom, $urandom})};
    bv = {1'b1, 52'({$urandom, $urandom})};
    case (t)
      0: begin av = '1; bv = '1; end
      1: begin av = {1'b1, 52'b0}; bv = {1'b1, 52'b0}; end
      2: begin av = 53'h1fff2231e0bf71; bv = 53'h10006eea106b38; end // rounds to 2^53
      3: begin av = {1'b1, 51'b0, 1'b1}; bv = {1'b1, 52'b0}; end       // product exact
      4: begin av = 53'h1; bv = 53'h1; end
      5: begin av = '0; bv = '1; end
      6: begin av = {1'b1, 51'b0, 1'b1}; bv = {2'b11, 51'b0}; end
      default: ;
    endcase
    // Exact ties: with b = 2^52 + 2 the bits below the mantissa are
    // {a[50:0], 0}, a tie when a[50] = 1 and a[49:0] = 0; the mantissa is
    // a + 2 + a[51], so a[51] chooses an even or an odd tie.
    if (t >= 7 && t < 40) begin
      av[49:0] = '0;
      av[50]   = 1'b1;
      av[51]   = t[0];
      bv       = {1'b1, 52'd2};
    end
    if (t >= 40 && t < 60) av[N-1] = 1'b0;   // hidden bit clear
  endtask

  // Compare outputs each cycle. 'cycle' numbers the clock periods; a check
  // at the edge that opens period c sees the outputs of period c - 1, so the
  // latency in periods is (cycle - 1) - issue, issue being the period in which
  // in_valid was presented.
  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (cs_valid) begin
        exp_t e;
        n_cs++;
        checks++;
        if (cs_q.size() == 0) begin
          failures++; $display("FAIL unexpected cs_valid at cycle %0d", cycle);
        end else begin
          e = cs_q.pop_front();
          if (cs_sum + cs_carry !== e.prod || cycle - 1 - e.issue != 2) begin
            failures++;
            if (failures < 10) $display("FAIL cs cycle %0d issued %0d got %h exp %h",
                                        cycle, e.issue, cs_sum + cs_carry, e.prod);
          end
        end
      end
      if (res_valid) begin
        exp_t e;
        n_res++;
        checks++;
        if (res_q.size() == 0) begin
          failures++; $display("FAIL unexpected res_valid at cycle %0d", cycle);
        end else begin
          e = res_q.pop_front();
          if (mant !== e.mant || ovf !== e.ovf || cycle - 1 - e.issue != 3) begin
            failures++;
            if (failures < 10) $display("FAIL res cycle %0d issued %0d got %h/%b exp %h/%b",
                                        cycle, e.issue, mant, ovf, e.mant, e.ovf);
          end
        end
      end
    end
  end

  initial begin
    exp_t e;
    logic [N-1:0] av, bv;
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < NUM_OPS; t++) begin
      @(negedge clk);
      if (t > 100 && $urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
        a = {$urandom, $urandom};
        b = {$urandom, $urandom};
        n_idle++;
        @(negedge clk);
      end
      pick(t, av, bv);
      a = av; b = bv; in_valid = 1'b1;
      e = reference(av, bv);
      e.issue = cycle;
      cs_q.push_back(e);
      res_q.push_back(e);
      cover_op(av, bv);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(posedge clk);

    checks++;
    if (n_res != NUM_OPS || n_cs != NUM_OPS) begin
      failures++; $display("FAIL saw %0d carry-save and %0d rounded results", n_cs, n_res);
    end
    $display("mechanisms: negative rows=%0d sign 1->2=%0d 2->3=%0d 3->4=%0d ovf=%0d no-ovf=%0d",
             n_neg, n_sign1, n_sign2, n_sign3, n_ovf, n_noovf);
    $display("            round up=%0d tie to even=%0d rounding carry out=%0d idle=%0d hidden bit clear=%0d",
             n_up, n_tie_even, n_carry_out, n_idle, n_denorm);
    checks++;
    if (n_neg == 0 || n_sign1 == 0 || n_sign2 == 0 || n_sign3 == 0 || n_ovf == 0 ||
        n_noovf == 0 || n_up == 0 || n_tie_even == 0 || n_carry_out == 0 ||
        n_idle == 0 || n_denorm == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
