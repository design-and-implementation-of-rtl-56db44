// tb_rev_addsub4: exhaustive self-checking test of the 4-bit reversible
// adder/subtractor. For all 512 combinations of a, b and mode s, y must be
// a + b (s = 0) or (a - b + 16) mod 32 (s = 1, two's-complement difference
// with y[4] = 1 when no borrow). Includes the published example
// 0101 + 0110 = 1011.
module tb_rev_addsub4;
  logic [3:0] a, b;
  logic       s;
  logic [4:0] y;
  int checks = 0, failures = 0;

  rev_addsub4 dut (.a(a), .b(b), .s(s), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_y;
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          a = 4'(i); b = 4'(j); s = 1'(m);
          #1;
          exp_y = (m == 0) ? i + j : (i - j + 16) % 32;
          checks++;
          if (int'(y) != exp_y) begin
            failures++;
            $display("FAIL s=%0d a=%0d b=%0d y=%0d exp=%0d", m, i, j, y, exp_y);
          end
        end
    a = 4'b0101; b = 4'b0110; s = 1'b0;
    #1;
    checks++;
    if (y !== 5'b01011) begin
      failures++;
      $display("FAIL example 0101+0110 gave %b", y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
