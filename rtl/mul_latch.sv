// Pipeline latch of the multiplier (used for the operand input latch and the
// carry-save output latch).
//
// An edge-triggered register of W bits: on a rising clock edge with en high
// it loads d, otherwise it holds. An active-low asynchronous reset clears it
// so that nothing downstream ever sees an uninitialised value. The
// multiplier's specification places latches at the operand inputs and at
// the carry-save output; modelling them as flip-flops with a load enable and
// a reset is this design's choice.
module mul_latch #(
  parameter int unsigned W = 106
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (en) begin
      q <= d;
    end
  end

endmodule
