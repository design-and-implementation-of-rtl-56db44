// bjn_gate: 3x3 reversible BJN gate.
//
// P = A, Q = B, R = (A or B) xor C. C = 0 gives OR, C = 1 gives NOR on R.
// Purely combinational. Used by the logic unit for the OR and NOR operations.
module bjn_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a | b) ^ c;
endmodule
