// Self-checking testbench for csa_row at its default width (106 bits).
// For random and extreme inputs it checks x + y + z = s + 2*c in 108-bit
// arithmetic.
module tb_csa_row;
  localparam int unsigned W = 106;

  logic         clk = 1'b0;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa_row #(.W(W)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    logic [W+1:0] lhs, rhs;
    for (int t = 0; t < 2000; t++) begin
      x = rnd(); y = rnd(); z = rnd();
      if (t == 0) begin x = '1; y = '1; z = '1; end
      if (t == 1) begin x = '1; y = '0; z = '1; end
      @(posedge clk);
      lhs = (W+2)'(x) + (W+2)'(y) + (W+2)'(z);
      rhs = (W+2)'(s) + ((W+2)'(c) << 1);
      checks++;
      if (lhs !== rhs) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h z=%h", x, y, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
