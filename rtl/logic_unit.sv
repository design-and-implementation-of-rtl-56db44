// logic_unit: the 4-bit logic unit of the reversible ALU.
//
// Eight bitwise operations are made from only two reversible gate types. Each
// bit has one TSG gate and one BJN gate whose control pins are driven from
// the operation code:
//   TSG, C=0 D=0: S = A AND B,  Q = A XOR B
//   TSG, C=0 D=1: R = A XNOR B
//   TSG, C=1 D=0: Q = NOT B,    S = A NAND B
//   TSG, C=1 D=0, A and B swapped: Q = NOT A
//   BJN, C=0: R = A OR B;  C=1: R = A NOR B
// A select then takes the right gate output. Codes that are not logic
// operations give 0. Purely combinational; the result is 4 bits wide.
// The gate types and the use of C and D as control lines follow the document;
// the swap used for NOT A, and NOT A itself on code 1010, are this design's.
module logic_unit
  import alu_pkg::*;
(
  input  logic [OPW-1:0]  a,
  input  logic [OPW-1:0]  b,
  input  logic [CTLW-1:0] control,
  output logic [OPW-1:0]  y
);
  alu_op_e op;
  logic tsg_c, tsg_d, swap, bjn_c;
  logic [OPW-1:0] ta, tb, tq, tr, ts, br;

  assign op = alu_op_e'(control);

  always_comb begin
    tsg_c = (op == OP_NOTB) || (op == OP_NAND) || (op == OP_NOTA);
    tsg_d = (op == OP_XNOR);
    swap  = (op == OP_NOTA);
    bjn_c = (op == OP_NOR);
  end

  assign ta = swap ? b : a;
  assign tb = swap ? a : b;

  for (genvar i = 0; i < OPW; i++) begin : g_bit
    tsg_gate u_tsg (
      .a(ta[i]), .b(tb[i]), .c(tsg_c), .d(tsg_d),
      .p(), .q(tq[i]), .r(tr[i]), .s(ts[i])
    );
    bjn_gate u_bjn (
      .a(a[i]), .b(b[i]), .c(bjn_c),
      .p(), .q(), .r(br[i])
    );
  end

  always_comb begin
    unique case (op)
      OP_AND, OP_NAND:          y = ts;
      OP_XOR, OP_NOTB, OP_NOTA: y = tq;
      OP_XNOR:                  y = tr;
      OP_OR, OP_NOR:            y = br;
      default:                  y = '0;
    endcase
  end
endmodule
