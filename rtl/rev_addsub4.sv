// rev_addsub4: 4-bit reversible ripple-carry adder/subtractor.
//
// Four HNG gates (D = 0) form a ripple-carry chain. A complement stage of four
// Feynman gates XORs every bit of B with the mode line s, and s is also the
// carry into bit 0, so s = 0 computes A + B and s = 1 computes
// A + ~B + 1 = A - B (two's complement). y[3:0] is the sum or difference and
// y[4] the carry out of the last HNG gate; when subtracting, y[4] = 1 means
// A >= B (no borrow). Purely combinational.
// The four-HNG ripple chain, the complement stage, the shared mode line and
// the 5-bit output follow the published structure; realising the complement
// with Feynman gates is this design's choice.
module rev_addsub4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       s,
  output logic [4:0] y
);
  logic [3:0] bx;
  logic [4:0] carry;

  assign carry[0] = s;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    feynman_gate u_cmp (
      .a(s),
      .b(b[i]),
      .p(),
      .q(bx[i])
    );
    hng_gate u_hng (
      .a(a[i]),
      .b(bx[i]),
      .c(carry[i]),
      .d(1'b0),
      .p(),
      .q(),
      .r(y[i]),
      .s(carry[i+1])
    );
  end

  assign y[4] = carry[4];
endmodule
