// Self-checking testbench for aoa_subarray.
// Three sub-arrays are checked: the first one of the default partition
// (4 rows from row 0), the third (8 rows from row 8) and the last
// (11 rows from row 16, the module default). Operands, multiplier windows
// and the incoming sign bit are random. The expected carry-save value is
// derived arithmetically, not from the row format: for rows F..L with Booth
// digits d_i taken straight from the multiplier bits,
//   sum_i d_i*A*4^i + s_(F-1)*4^(F-1) - s_L*4^L + sum_i K_i
// where s_i = (d_i < 0), K_0 = 2^56 and K_i = 3*2^(2i+54) for i > 0 are the
// pre-added sign-extension constants, seen from bit BASE upward. For the
// first two sub-arrays this value is below 2^106 and sum + carry must equal
// it exactly, as an integer; the last one is compared modulo 2^106. The
// sign bit handed on must equal s_L.
module tb_aoa_subarray;
  import aoa_pkg::*;

  localparam int unsigned N  = MANT_W;
  localparam int unsigned PW = 2 * N;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  int neg_last = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] a;

  // DUT 0: P=4, FIRST=0 (frame bits 0..61)
  logic [8:0]    bw0;  logic si0, so0;  logic [61:0] s0, c0;
  aoa_subarray #(.N(N), .P(4), .FIRST(0)) dut0 (
    .a(a), .bwin(bw0), .sign_in(si0), .sum(s0), .carry(c0), .sign_out(so0));
  // DUT 1: P=8, FIRST=8 (frame bits 14..85)
  logic [16:0]   bw1;  logic si1, so1;  logic [71:0] s1, c1;
  aoa_subarray #(.N(N), .P(8), .FIRST(8)) dut1 (
    .a(a), .bwin(bw1), .sign_in(si1), .sum(s1), .carry(c1), .sign_out(so1));
  // DUT 2: defaults, P=11, FIRST=16 (frame bits 30..105)
  logic [22:0]   bw2;  logic si2, so2;  logic [PW-31:0] s2, c2;
  aoa_subarray dut2 (
    .a(a), .bwin(bw2), .sign_in(si2), .sum(s2), .carry(c2), .sign_out(so2));

  // Expected contribution of rows first..first+p-1, modulo 2^PW.
  function automatic logic [PW-1:0] expected(input logic [N-1:0] av,
      input logic [22:0] bw, input int p, input int first, input logic sin,
      output logic slast);
    logic [127:0] acc, mag;
    int d;
    acc = '0;
    slast = 1'b0;
    for (int k = 0; k < p; k++) begin
      int i;
      i = first + k;
      d = -2 * int'(bw[2*k+2]) + int'(bw[2*k+1]) + int'(bw[2*k]);
      mag = 128'(av) * 128'(d < 0 ? -d : d);
      mag = mag << (2 * i);
      acc = (d < 0) ? acc - mag : acc + mag;
      if (i == 0) acc = acc + (128'(1) << 56);
      else        acc = acc + (128'(3) << (2 * i + 54));
      slast = (d < 0);
    end
    if (first > 0 && sin) acc = acc + (128'(1) << (2 * first - 2));
    if (slast)            acc = acc - (128'(1) << (2 * (first + p - 1)));
    return acc[PW-1:0];
  endfunction

  initial begin
    logic [PW-1:0] e;
    logic          sl;
    logic [PW-1:0] got;
    for (int t = 0; t < 3000; t++) begin
      a   = {$urandom, $urandom};
      bw0 = {$urandom} & 9'h1fe;   // b[-1] = 0 for the first sub-array
      bw1 = $urandom;
      bw2 = $urandom;
      si0 = 1'b0;
      si1 = $urandom_range(0, 1);
      si2 = $urandom_range(0, 1);
      if (t == 0) begin a = '1; bw0 = 9'h1fe; bw1 = '1; bw2 = '1; si1 = 1; si2 = 1; end
      @(posedge clk);

      e = expected(a, 23'(bw0), 4, 0, si0, sl);
      got = PW'(s0) + PW'(c0);
      checks++;
      if (got !== e || so0 !== sl) begin
        failures++;
        if (failures < 10) $display("FAIL dut0 a=%h b=%h got=%h exp=%h", a, bw0, got, e);
      end

      e = expected(a, 23'(bw1), 8, 8, si1, sl);
      got = (PW'(s1) + PW'(c1)) << 14;
      checks++;
      if (got !== (e & ~PW'(14'h3fff)) || e[13:0] != 0 || so1 !== sl) begin
        failures++;
        if (failures < 10) $display("FAIL dut1 a=%h b=%h got=%h exp=%h", a, bw1, got, e);
      end

      e = expected(a, bw2, 11, 16, si2, sl);
      got = (PW'(s2) + PW'(c2)) << 30;
      checks++;
      if (sl) neg_last++;
      if (got !== (e & ~PW'(30'h3fffffff)) || e[29:0] != 0 || so2 !== sl) begin
        failures++;
        if (failures < 10) $display("FAIL dut2 a=%h b=%h got=%h exp=%h", a, bw2, got, e);
      end
    end
    checks++;
    if (neg_last == 0) begin failures++; $display("FAIL no negative last row seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
