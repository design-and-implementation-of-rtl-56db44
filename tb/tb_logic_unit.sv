// tb_logic_unit: exhaustive self-checking test of the logic unit.
// For every control code and every operand pair the 4-bit result is compared
// with a bit-by-bit truth-table model of the eight operations; codes that
// are not logic operations must give 0.
module tb_logic_unit;
  logic [3:0] a, b, control, y;
  int checks = 0, failures = 0;

  logic_unit dut (.a(a), .b(b), .control(control), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One bit of the expected result, by truth table: index = {ai, bi}.
  function automatic logic ref_bit(input int code, input logic ai, input logic bi);
    logic [3:0] tt;
    case (code)
      5:  tt = 4'b1000;  // AND
      6:  tt = 4'b0110;  // XOR
      7:  tt = 4'b1001;  // XNOR
      8:  tt = 4'b0101;  // NOT B
      9:  tt = 4'b0111;  // NAND
      10: tt = 4'b0011;  // NOT A
      11: tt = 4'b1110;  // OR
      12: tt = 4'b0001;  // NOR
      default: tt = 4'b0000;
    endcase
    return tt[{ai, bi}];
  endfunction

  initial begin
    logic [3:0] exp_y;
    for (int k = 0; k < 16; k++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          control = 4'(k); a = 4'(i); b = 4'(j);
          #1;
          for (int n = 0; n < 4; n++) exp_y[n] = ref_bit(k, a[n], b[n]);
          checks++;
          if (y !== exp_y) begin
            failures++;
            $display("FAIL code=%0d a=%b b=%b y=%b exp=%b", k, a, b, y, exp_y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
