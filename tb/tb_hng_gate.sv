// tb_hng_gate: exhaustive self-checking test of the HNG gate.
// All sixteen input patterns are applied. R must be (A+B+C) mod 2 and S the
// full-adder carry (A+B+C >= 2) XOR D; P and Q pass A and B.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      n = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== 1'(n % 2) || s !== ((n >= 2) ^ d)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b d=%0b -> %0b%0b%0b%0b", a, b, c, d, p, q, r, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
