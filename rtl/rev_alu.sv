// rev_alu: 4-bit ALU built from reversible logic gates with a Vedic multiplier.
//
// Two 4-bit operands a and b and a 4-bit control code select one of 13
// operations (see alu_pkg): add, subtract, multiply, increment, decrement and
// eight bitwise logic operations. The arithmetic unit (HNG adder/subtractors
// and a Urdhva Tiryagbhyam multiplier of Peres gates and HNG adders) and the
// logic unit (TSG and BJN gates) work in parallel; a multiplexer picks the
// result named by control and a rising-edge register drives the 8-bit output y.
//
// Timing: y shows the result of the a, b and control present at a rising clk
// edge right after that edge (one-cycle latency, one new operation per cycle).
// rst_n is an active-low synchronous reset that clears y.
// The unit structure, operation codes and widths follow the document; the
// reset, the zero-extension of narrow results and the value 0 for unused
// codes are this design's choices.
module rev_alu
  import alu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [OPW-1:0]  a,
  input  logic [OPW-1:0]  b,
  input  logic [CTLW-1:0] control,
  output logic [RESW-1:0] y
);
  arith_res_t      arith;
  logic [OPW-1:0]  logic_y;
  logic [RESW-1:0] mux_y;

  arith_unit u_arith (.a(a), .b(b), .res(arith));
  logic_unit u_logic (.a(a), .b(b), .control(control), .y(logic_y));
  alu_mux    u_mux   (.arith(arith), .logic_y(logic_y), .control(control), .y(mux_y));
  out_reg #(.W(RESW)) u_reg (.clk(clk), .rst_n(rst_n), .d(mux_y), .q(y));
endmodule
