// tb_peres_gate: exhaustive self-checking test of the Peres gate.
// All eight input patterns are applied; outputs are compared with
// P = A, Q = (A + B) mod 2, R = (A*B + C) mod 2, and with C = 0 the pair
// {R, Q} must equal the half-adder sum A + B.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (p !== a || q !== 1'((int'(a) + int'(b)) % 2) ||
          r !== 1'((int'(a) * int'(b) + int'(c)) % 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> %0b%0b%0b", a, b, c, p, q, r);
      end
      if (!c) begin
        checks++;
        if (int'({r, q}) != int'(a) + int'(b)) begin
          failures++;
          $display("FAIL half adder a=%0b b=%0b", a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
