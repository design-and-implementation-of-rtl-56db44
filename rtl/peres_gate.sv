// peres_gate: 3x3 reversible Peres gate.
//
// P = A, Q = A xor B, R = (A and B) xor C. With C = 0 it is a half adder:
// Q is the sum and R the carry (or, on its own, R is A AND B). Purely
// combinational. Used in this design to build the 2x2 Vedic multiplier.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
