// tb_rev_rca: self-checking test of the HNG ripple-carry adder.
// Runs every operand pair of the default 4-bit adder and, in a second
// instance at 6 bits (the width the multiplier uses), 2000 random pairs.
// The W+1-bit sum is compared with integer addition.
module tb_rev_rca;
  logic [3:0] x4, z4;
  logic [4:0] s4;
  logic [5:0] x6, z6;
  logic [6:0] s6;
  int checks = 0, failures = 0;

  rev_rca #(.W(4)) dut4 (.x(x4), .z(z4), .sum(s4));
  rev_rca #(.W(6)) dut6 (.x(x6), .z(z6), .sum(s6));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        x4 = 4'(i); z4 = 4'(j);
        #1;
        checks++;
        if (int'(s4) != i + j) begin
          failures++;
          $display("FAIL W=4 %0d+%0d=%0d", i, j, s4);
        end
      end
    for (int k = 0; k < 2000; k++) begin
      x6 = 6'($urandom); z6 = 6'($urandom);
      #1;
      checks++;
      if (int'(s6) != int'(x6) + int'(z6)) begin
        failures++;
        $display("FAIL W=6 %0d+%0d=%0d", x6, z6, s6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
