// tsg_gate: 4x4 reversible TSG gate.
//
// P = A, Q = A'C' xor B', R = Q xor D, S = Q.D xor (AB xor C), where ' is
// complement. With C and D used as control lines the gate yields several logic
// functions of A and B: C=0 gives Q = A xor B and (D=1) R = XNOR, (D=0) S = AND;
// C=1 gives Q = NOT B and (D=0) S = NAND. Purely combinational.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic t;
  assign t = (~a & ~c) ^ ~b;
  assign p = a;
  assign q = t;
  assign r = t ^ d;
  assign s = (t & d) ^ ((a & b) ^ c);
endmodule
