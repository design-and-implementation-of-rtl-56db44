// tb_tsg_gate: exhaustive self-checking test of the TSG gate.
// All sixteen input patterns are applied and compared with an arithmetic
// form of the gate equations (modulo-2 sums of products). It also checks the
// logic functions the ALU draws from the gate: C=0 D=0 gives AND on S and
// XOR on Q, C=0 D=1 gives XNOR on R, C=1 D=0 gives NOT B on Q and NAND on S.
module tb_tsg_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;

  tsg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b c=%0b d=%0b got=%0b", what, a, b, c, d, got);
    end
  endtask

  initial begin
    int na, nb, nc, t;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      na = 1 - int'(a); nb = 1 - int'(b); nc = 1 - int'(c);
      t  = (na * nc + nb) % 2;
      check(p, a, "P");
      check(q, 1'(t), "Q");
      check(r, 1'((t + int'(d)) % 2), "R");
      check(s, 1'((t * int'(d) + int'(a) * int'(b) + int'(c)) % 2), "S");
      if (!c && !d) begin
        check(s, a & b, "AND");
        check(q, a != b, "XOR");
      end
      if (!c && d)  check(r, a == b, "XNOR");
      if (c && !d) begin
        check(q, !b, "NOTB");
        check(s, !(a & b), "NAND");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
