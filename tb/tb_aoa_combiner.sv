// Self-checking testbench for aoa_combiner with the default partition
// (4, 4, 8, 11 rows: sub-arrays start at product bits 0, 6, 14 and 30).
// Random carry-save pairs are applied, confined to the bit ranges the
// sub-arrays deliver (pair 1 below bit 61, pair 2 in bits 6..68, pair 3 in
// bits 14..84, pair 4 in bits 30..105), so that the running sums stay
// below the tops of compressors 1 and 2 (bits 71 and 87) as they do in the
// multiplier. sum + carry must equal the sum of all eight inputs modulo
// 2^106. All-ones inputs in those ranges are the worst case for the top
// carries and force compressor 4's carries across the seam at bit 52.
module tb_aoa_combiner;
  import aoa_pkg::*;

  localparam int unsigned PW = 2 * MANT_W;

  logic          clk = 1'b0;
  logic [PW-1:0] s1, c1, s2, c2, s3, c3, s4, c4, sum, carry;
  int checks = 0, failures = 0;

  aoa_combiner dut (.s1(s1), .c1(c1), .s2(s2), .c2(c2), .s3(s3), .c3(c3),
                    .s4(s4), .c4(c4), .sum(sum), .carry(carry));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PW-1:0] field(input int lo, input int hi);
    return ((PW'(1) << hi) - 1'b1) & ~((PW'(1) << lo) - 1'b1);
  endfunction

  function automatic logic [PW-1:0] rnd(input int lo, input int hi);
    logic [PW-1:0] v;
    v = {$urandom, $urandom, $urandom, $urandom};
    return v & field(lo, hi);
  endfunction

  initial begin
    logic [PW-1:0] e;
    for (int t = 0; t < 3000; t++) begin
      s1 = rnd(0, 61);  c1 = rnd(0, 61);
      s2 = rnd(6, 69);  c2 = rnd(6, 69);
      s3 = rnd(14, 85); c3 = rnd(14, 85);
      s4 = rnd(30, 106); c4 = rnd(30, 106);
      if (t < 2) begin
        s1 = field(0, 61);  c1 = s1;
        s2 = field(6, 69);  c2 = s2;
        s3 = field(14, 85); c3 = s3;
        s4 = field(30, 106); c4 = s4;
        if (t == 1) begin c1 = '0; s4 = '0; end
      end
      @(posedge clk);
      e = s1 + c1 + s2 + c2 + s3 + c3 + s4 + c4;
      checks++;
      if (sum + carry !== e) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got=%h exp=%h", t, sum + carry, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
