// feynman_gate: 2x2 reversible Feynman (CNOT) gate.
//
// P = A, Q = A xor B. A is the control line, B the target. Purely
// combinational; no clock. In this ALU it forms the B-complement stage of the
// adder/subtractor (A = subtract select, B = operand bit).
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
