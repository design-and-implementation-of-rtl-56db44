// vedic_mult4: 4x4-bit reversible Vedic multiplier.
//
// Each operand is split into two 2-bit halves and four 2x2 Vedic multipliers
// form the products p0 = a[1:0]*b[1:0], p1 = a[1:0]*b[3:2],
// p2 = a[3:2]*b[1:0] and p3 = a[3:2]*b[3:2]. p0[1:0] is the product's q[1:0].
// Three HNG ripple adders then combine the rest: the first adds p0[3:2] to p1,
// the second adds p2 to p3 shifted left by two bits, and the third adds the
// two sums to give q[7:2]. That is a*b = p0 + 4*(p1 + p2) + 16*p3.
// Purely combinational. The split, the four multipliers, the three adders and
// what each adds follow the document; the adder widths (4, 6 and 6 bits) are
// this design's choice.
module vedic_mult4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] q
);
  logic [3:0] p0, p1, p2, p3;
  logic [4:0] s1;  // p0[3:2] + p1, at most 12
  logic [6:0] s2;  // p2 + (p3 << 2), at most 45
  logic [6:0] s3;  // s1 + s2, at most 57

  vedic_mult2 u_m0 (.a(a[1:0]), .b(b[1:0]), .q(p0));
  vedic_mult2 u_m1 (.a(a[1:0]), .b(b[3:2]), .q(p1));
  vedic_mult2 u_m2 (.a(a[3:2]), .b(b[1:0]), .q(p2));
  vedic_mult2 u_m3 (.a(a[3:2]), .b(b[3:2]), .q(p3));

  rev_rca #(.W(4)) u_add1 (.x({2'b00, p0[3:2]}), .z(p1), .sum(s1));
  rev_rca #(.W(6)) u_add2 (.x({2'b00, p2}), .z({p3, 2'b00}), .sum(s2));
  rev_rca #(.W(6)) u_add3 (.x({1'b0, s1}), .z(s2[5:0]), .sum(s3));

  assign q = {s3[5:0], p0[1:0]};
endmodule
