// Self-checking testbench for compressor42 at widths 8 (default) and 46.
// For random inputs and carry-in it checks the exact identity
// a + b + c + d + cin = sum + 2*carry + 2^W * cout.
module tb_compressor42;
  localparam int unsigned W  = 8;
  localparam int unsigned WB = 46;

  logic          clk = 1'b0;
  logic [W-1:0]  a, b, c, d, sum, carry;
  logic          cin, cout;
  logic [WB-1:0] ab, bb, cb, db, sumb, carryb;
  logic          cinb, coutb;
  int checks = 0, failures = 0;

  compressor42 #(.W(W)) dut (.a(a), .b(b), .c(c), .d(d), .cin(cin),
                             .sum(sum), .carry(carry), .cout(cout));
  compressor42 #(.W(WB)) dut_wide (.a(ab), .b(bb), .c(cb), .d(db), .cin(cinb),
                                   .sum(sumb), .carry(carryb), .cout(coutb));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W+2:0]  l, r;
    logic [WB+2:0] lb, rb;
    for (int t = 0; t < 3000; t++) begin
      {a, b, c, d} = {$urandom};
      cin = $urandom_range(0, 1);
      ab = {$urandom, $urandom}; bb = {$urandom, $urandom};
      cb = {$urandom, $urandom}; db = {$urandom, $urandom};
      cinb = $urandom_range(0, 1);
      if (t == 0) begin {a, b, c, d} = '1; cin = 1'b1; {ab, bb, cb, db} = '1; cinb = 1'b1; end
      @(posedge clk);
      l  = (W+3)'(a) + (W+3)'(b) + (W+3)'(c) + (W+3)'(d) + (W+3)'(cin);
      r  = (W+3)'(sum) + ((W+3)'(carry) << 1) + ((W+3)'(cout) << W);
      lb = (WB+3)'(ab) + (WB+3)'(bb) + (WB+3)'(cb) + (WB+3)'(db) + (WB+3)'(cinb);
      rb = (WB+3)'(sumb) + ((WB+3)'(carryb) << 1) + ((WB+3)'(coutb) << WB);
      checks += 2;
      if (l !== r) begin
        failures++;
        if (failures < 10) $display("FAIL W=%0d a=%h b=%h c=%h d=%h cin=%b", W, a, b, c, d, cin);
      end
      if (lb !== rb) begin
        failures++;
        if (failures < 10) $display("FAIL W=%0d", WB);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
