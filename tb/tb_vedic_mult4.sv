// tb_vedic_mult4: exhaustive self-checking test of the 4x4 Vedic multiplier.
// All 256 operand pairs; the 8-bit product is compared with integer
// multiplication.
module tb_vedic_mult4;
  logic [3:0] a, b;
  logic [7:0] q;
  int checks = 0, failures = 0;

  vedic_mult4 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (int'(q) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d=%0d", i, j, q);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
