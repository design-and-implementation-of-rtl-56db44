// tb_arith_unit: exhaustive self-checking test of the arithmetic unit.
// For all 256 operand pairs the five parallel results are compared with
// integer arithmetic: sum, (a - b + 16) mod 32, product, a + 1 and
// (a + 15) mod 32 (that is a - 1 with the carry-out bit of the
// adder/subtractor in bit 4).
module tb_arith_unit;
  import alu_pkg::*;
  logic [3:0] a, b;
  arith_res_t res;
  int checks = 0, failures = 0;

  arith_unit dut (.a(a), .b(b), .res(res));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] got, input int exp, input string what);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d got=%0d exp=%0d", what, a, b, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        check(res.add_y, i + j, "add");
        check(res.sub_y, (i - j + 16) % 32, "sub");
        check(res.mul_y, i * j, "mul");
        check(res.inc_y, i + 1, "inc");
        check(res.dec_y, (i - 1 + 16) % 32, "dec");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
