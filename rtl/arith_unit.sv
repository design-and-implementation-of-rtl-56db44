// arith_unit: the arithmetic unit of the reversible ALU.
//
// Computes all five arithmetic results in parallel from the 4-bit operands;
// the ALU's multiplexer then picks one. Add, subtract, increment and
// decrement each use a reversible adder/subtractor: A+B (mode 0), A-B
// (mode 1), A+1 (B forced to 1, mode 0) and A-1 (B forced to 1, mode 1).
// Their 5-bit results (carry out in bit 4) are zero-extended to 8 bits. The
// product comes from the 4x4 Vedic multiplier and fills all 8 bits.
// Purely combinational. The five operations follow the document; computing
// them in parallel and deriving increment and decrement from the
// adder/subtractor with a constant 1 are this design's choices.
module arith_unit
  import alu_pkg::*;
(
  input  logic [OPW-1:0] a,
  input  logic [OPW-1:0] b,
  output arith_res_t     res
);
  localparam logic [OPW-1:0] ONE = OPW'(1);

  logic [OPW:0] add_r, sub_r, inc_r, dec_r;
  logic [RESW-1:0] mul_r;

  rev_addsub4 u_add (.a(a), .b(b),   .s(1'b0), .y(add_r));
  rev_addsub4 u_sub (.a(a), .b(b),   .s(1'b1), .y(sub_r));
  rev_addsub4 u_inc (.a(a), .b(ONE), .s(1'b0), .y(inc_r));
  rev_addsub4 u_dec (.a(a), .b(ONE), .s(1'b1), .y(dec_r));
  vedic_mult4 u_mul (.a(a), .b(b), .q(mul_r));

  always_comb begin
    res.add_y = RESW'(add_r);
    res.sub_y = RESW'(sub_r);
    res.mul_y = mul_r;
    res.inc_y = RESW'(inc_r);
    res.dec_y = RESW'(dec_r);
  end
endmodule
