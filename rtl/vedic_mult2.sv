// vedic_mult2: 2x2-bit Urdhva Tiryagbhyam (vertical and crosswise) multiplier
// built from reversible Peres gates.
//
// Four Peres gates with C = 0 form the partial products a0b0, a1b0, a0b1 and
// a1b1 on their R outputs. The crosswise terms a1b0 and a0b1 are summed in a
// Peres half adder (q1 and a carry), and the vertical term a1b1 is added to
// that carry in a second Peres half adder (q2, q3). q0 is a0b0.
// Purely combinational. The document states only that the 2-bit multipliers
// are reversible Vedic multipliers; this gate-level arrangement is this
// design's.
module vedic_mult2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic pp10, pp01, pp11, c1;

  peres_gate u_pp00 (.a(a[0]), .b(b[0]), .c(1'b0), .p(), .q(), .r(q[0]));
  peres_gate u_pp10 (.a(a[1]), .b(b[0]), .c(1'b0), .p(), .q(), .r(pp10));
  peres_gate u_pp01 (.a(a[0]), .b(b[1]), .c(1'b0), .p(), .q(), .r(pp01));
  peres_gate u_pp11 (.a(a[1]), .b(b[1]), .c(1'b0), .p(), .q(), .r(pp11));

  peres_gate u_ha1  (.a(pp10), .b(pp01), .c(1'b0), .p(), .q(q[1]), .r(c1));
  peres_gate u_ha2  (.a(pp11), .b(c1),   .c(1'b0), .p(), .q(q[2]), .r(q[3]));
endmodule
