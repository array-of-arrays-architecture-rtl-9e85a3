// Self-checking testbench for mul_latch.
// Checks that reset clears the register, that it loads on a clock edge with
// en high, holds with en low, and that a load appears one edge later.
module tb_mul_latch;
  localparam int unsigned W = 106;

  logic         clk = 1'b0;
  logic         rst_n, en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  mul_latch #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; d = '1;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    model = '0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      en = $urandom_range(0, 1);
      d  = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d en=%b q=%h exp=%h", t, en, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
