// rev_rca: W-bit ripple-carry adder built from reversible HNG gates.
//
// Each bit is one HNG gate with D = 0: A and B are the operand bits, C the
// carry from the bit below, R the sum bit and S the carry to the bit above.
// The carry into bit 0 is 0. The result is W+1 bits wide, the carry out on
// top, so no sum is lost. Purely combinational. The Vedic multiplier uses
// three of these; their widths (4 and 6 bits) are this design's choice, the
// smallest that hold the partial sums.
module rev_rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] z,
  output logic [W:0]   sum
);
  logic [W:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    hng_gate u_hng (
      .a(x[i]),
      .b(z[i]),
      .c(carry[i]),
      .d(1'b0),
      .p(),
      .q(),
      .r(sum[i]),
      .s(carry[i+1])
    );
  end

  assign sum[W] = carry[W];
endmodule
