// Self-checking testbench for round_unit.
// A 106-bit product P is chosen (random products of normalised mantissas,
// plus values built to hit ties, sticky-only cases and a mantissa of all
// ones that rounds up into the next binade) and split at random into a
// carry-save pair. The reference rounds P by integer arithmetic: shift by
// 53 if bit 105 is set, else by 52; round to nearest, ties to even; a
// result of 2^53 becomes 2^52 with the overflow flag set.
module tb_round_unit;
  import aoa_pkg::*;

  localparam int unsigned N  = MANT_W;
  localparam int unsigned PW = 2 * N;

  logic          clk = 1'b0;
  logic [PW-1:0] cs_sum, cs_carry;
  logic [N-1:0]  mant;
  logic          ovf;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_tie_even = 0, n_tie_odd = 0, n_carry_out = 0, n_up = 0;

  round_unit dut (.cs_sum(cs_sum), .cs_carry(cs_carry), .mant(mant), .ovf(ovf));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [PW-1:0] p);
    int sh;
    logic [PW:0]  q, rem, half;
    logic [N-1:0] em;
    logic         eo;
    sh   = p[PW-1] ? N : N - 1;
    q    = (PW+1)'(p) >> sh;
    rem  = (PW+1)'(p) & ((( (PW+1)'(1)) << sh) - 1'b1);
    half = (PW+1)'(1) << (sh - 1);
    if (rem == half && !q[0]) n_tie_even++;
    if (rem == half &&  q[0]) n_tie_odd++;
    if (rem > half || (rem == half && q[0])) begin
      q = q + 1'b1;
      n_up++;
    end
    eo = p[PW-1];
    if (q[N]) begin
      q = q >> 1;
      eo = 1'b1;
      n_carry_out++;
    end
    if (eo) n_ovf++;
    em = q[N-1:0];
    cs_carry = {$urandom, $urandom, $urandom, $urandom};
    cs_sum   = p - cs_carry;
    @(posedge clk);
    checks++;
    if (mant !== em || ovf !== eo) begin
      failures++;
      if (failures < 10) $display("FAIL p=%h mant=%h ovf=%b exp %h %b", p, mant, ovf, em, eo);
    end
  endtask

  initial begin
    logic [N-1:0] a, b;
    logic [PW-1:0] p;
    for (int t = 0; t < 5000; t++) begin
      a = {1'b1, 52'({$urandom, $urandom})};
      b = {1'b1, 52'({$urandom, $urandom})};
      check(PW'(a) * PW'(b));
    end
    for (int t = 0; t < 200; t++) begin
      p = {2'b01, 52'({$urandom, $urandom}), 52'b0};
      p[51] = 1'b1;                 // exact tie, no overflow
      check(p);
      p = {1'b1, 52'({$urandom, $urandom}), 53'b0};
      p[52] = 1'b1;                 // exact tie, overflow
      check(p);
      p[0] = 1'b1;                  // just above the tie
      check(p);
    end
    check({2'b01, {53{1'b1}}, 1'b1, 50'b0});      // all ones rounds into next binade
    check({2'b01, {53{1'b1}}, 1'b0, 50'b1});      // all ones, below half
    check({1'b1, {52{1'b1}}, 1'b0, 1'b1, 51'b0}); // overflow, tie, even
    checks++;
    if (n_ovf == 0 || n_tie_even == 0 || n_tie_odd == 0 || n_carry_out == 0 || n_up == 0) begin
      failures++;
      $display("FAIL coverage ovf=%0d tie_even=%0d tie_odd=%0d carry_out=%0d up=%0d",
               n_ovf, n_tie_even, n_tie_odd, n_carry_out, n_up);
    end
    $display("round cases: ovf=%0d tie_even=%0d tie_odd=%0d carry_out=%0d round_up=%0d",
             n_ovf, n_tie_even, n_tie_odd, n_carry_out, n_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
