// tb_feynman_gate: exhaustive self-checking test of the Feynman gate.
// All four input patterns are applied; P and Q are compared with A and the
// modulo-2 sum of A and B.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== a || q !== 1'((int'(a) + int'(b)) % 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b p=%0b q=%0b", a, b, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
