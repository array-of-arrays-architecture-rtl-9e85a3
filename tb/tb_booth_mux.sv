// Self-checking testbench for booth_mux.
// Random 53-bit multiplicands are combined with each of the five Booth
// digits. The expected row is d*A for d >= 0, and the ones' complement of
// |d|*A (54 bits) with sign = 1 for d < 0, so that pp + sign = -|d|*A
// modulo 2^54.
module tb_booth_mux;
  import aoa_pkg::*;

  localparam int unsigned N = MANT_W;

  logic         clk = 1'b0;
  logic [N-1:0] a;
  booth_ctl_t   ctl;
  logic [N:0]   pp;
  logic         sign;
  int checks = 0, failures = 0;

  booth_mux #(.N(N)) dut (.a(a), .ctl(ctl), .pp(pp), .sign(sign));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:0] mag, expd;
    for (int t = 0; t < 1000; t++) begin
      a = {$urandom, $urandom};
      if (t == 0) a = '1;
      if (t == 1) a = '0;
      for (int d = -2; d <= 2; d++) begin
        ctl.neg = (d < 0);
        ctl.one = (d == 1 || d == -1);
        ctl.two = (d == 2 || d == -2);
        @(posedge clk);
        mag  = (d == 2 || d == -2) ? ({1'b0, a} << 1) : (d == 0 ? '0 : {1'b0, a});
        expd = (d < 0) ? ((N+1)'(0) - mag - 1'b1) : mag;
        checks++;
        if (pp !== expd || sign !== (d < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h d=%0d pp=%h exp=%h sign=%b", a, d, pp, expd, sign);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
