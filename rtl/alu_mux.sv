// alu_mux: result multiplexer of the reversible ALU.
//
// Selects one of the 13 operation results by the 4-bit control signal
// (operation codes in alu_pkg). The five arithmetic results arrive as 8-bit
// words; the 4-bit logic result is zero-extended to 8 bits. Control codes
// 1101-1111 name no operation and select 0. Purely combinational.
// The multiplexer and its select line follow the document; the zero
// extension and the result for unused codes are this design's choices.
module alu_mux
  import alu_pkg::*;
(
  input  arith_res_t      arith,
  input  logic [OPW-1:0]  logic_y,
  input  logic [CTLW-1:0] control,
  output logic [RESW-1:0] y
);
  always_comb begin
    case (control)
      OP_ADD:  y = arith.add_y;
      OP_SUB:  y = arith.sub_y;
      OP_MUL:  y = arith.mul_y;
      OP_INC:  y = arith.inc_y;
      OP_DEC:  y = arith.dec_y;
      OP_AND, OP_XOR, OP_XNOR, OP_NOTB, OP_NAND, OP_NOTA, OP_OR, OP_NOR:
               y = RESW'(logic_y);
      default: y = '0;
    endcase
  end
endmodule
