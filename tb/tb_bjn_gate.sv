// tb_bjn_gate: exhaustive self-checking test of the BJN gate.
// All eight input patterns are applied; R must be OR for C = 0 and NOR for
// C = 1, and P, Q must pass A and B.
module tb_bjn_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  bjn_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_r;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      exp_r = (int'(a) + int'(b) > 0) ? !c : c;
      checks++;
      if (p !== a || q !== b || r !== exp_r) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> %0b%0b%0b", a, b, c, p, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
