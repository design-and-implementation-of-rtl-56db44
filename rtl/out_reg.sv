// out_reg: positive-edge output register of the reversible ALU.
//
// Captures the multiplexer output on every rising edge of clk, so the ALU
// result appears one clock after its operands and control. An active-low
// synchronous reset clears it to 0. The register on the rising edge follows
// the document's architecture; the reset is this design's addition, so that
// the output is defined before the first operation.
module out_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
