// Self-checking testbench for booth_encoder.
// All eight multiplier windows are applied; the digit the controls select
// (+/- 0, 1 or 2 times A) is compared with -2*b[2i+1] + b[2i] + b[2i-1].
// Zero digits must not set neg, and one/two must never both be set.
module tb_booth_encoder;
  import aoa_pkg::*;

  logic       clk = 1'b0;
  logic [2:0] win;
  booth_ctl_t ctl;
  int checks = 0, failures = 0;

  booth_encoder dut (.win(win), .ctl(ctl));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expd, got;
    for (int w = 0; w < 8; w++) begin
      win = 3'(w);
      @(posedge clk);
      expd = -2 * int'(win[2]) + int'(win[1]) + int'(win[0]);
      got  = (ctl.one ? 1 : 0) + (ctl.two ? 2 : 0);
      if (ctl.neg) got = -got;
      checks++;
      if (got != expd || (ctl.one && ctl.two) || (expd == 0 && ctl.neg)) begin
        failures++;
        $display("FAIL win=%b ctl=%p expected digit %0d", win, ctl, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
