// alu_pkg: operation codes and widths shared by the reversible Vedic ALU.
//
// The 4-bit control signal selects one of 13 operations: five arithmetic
// (codes 0-4) and eight bitwise logic operations (codes 5-12). Codes 13-15 are
// unused; this design answers them with an all-zero result. Operand width (4)
// and result width (8) follow the published specification, as do codes 0-9
// and 11-12. The published description promises eight distinct logic
// operations including a NOT; this design gives code 1010 to NOT A, next to
// NOT B on 1000.
package alu_pkg;

  localparam int unsigned OPW  = 4;  // operand width
  localparam int unsigned RESW = 8;  // result width
  localparam int unsigned CTLW = 4;  // control signal width

  typedef enum logic [CTLW-1:0] {
    OP_ADD  = 4'b0000,
    OP_SUB  = 4'b0001,
    OP_MUL  = 4'b0010,
    OP_INC  = 4'b0011,
    OP_DEC  = 4'b0100,
    OP_AND  = 4'b0101,
    OP_XOR  = 4'b0110,
    OP_XNOR = 4'b0111,
    OP_NOTB = 4'b1000,
    OP_NAND = 4'b1001,
    OP_NOTA = 4'b1010,
    OP_OR   = 4'b1011,
    OP_NOR  = 4'b1100
  } alu_op_e;

  // Results of the arithmetic unit, one 8-bit word per operation.
  typedef struct packed {
    logic [RESW-1:0] add_y;
    logic [RESW-1:0] sub_y;
    logic [RESW-1:0] mul_y;
    logic [RESW-1:0] inc_y;
    logic [RESW-1:0] dec_y;
  } arith_res_t;

endpackage
