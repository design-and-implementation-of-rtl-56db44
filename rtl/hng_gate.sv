// hng_gate: 4x4 reversible HNG gate.
//
// P = A, Q = B, R = A xor B xor C, S = ((A xor B) and C) xor (A and B) xor D.
// With D = 0 and C as carry in, R is the full-adder sum and S the carry out.
// Purely combinational. All adders of this ALU are ripple chains of HNG gates.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
