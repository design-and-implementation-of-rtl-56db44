// tb_alu_mux: self-checking test of the result multiplexer.
// Each of the five arithmetic inputs and the logic input carries a distinct
// random value; for every control code the output must be the input that code
// names (the logic result zero-extended), or 0 for codes 13-15.
module tb_alu_mux;
  import alu_pkg::*;
  arith_res_t arith;
  logic [3:0] logic_y, control;
  logic [7:0] y;
  int checks = 0, failures = 0;

  alu_mux dut (.arith(arith), .logic_y(logic_y), .control(control), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_y;
    for (int r = 0; r < 50; r++) begin
      arith.add_y = 8'($urandom); arith.sub_y = 8'($urandom);
      arith.mul_y = 8'($urandom); arith.inc_y = 8'($urandom);
      arith.dec_y = 8'($urandom); logic_y = 4'($urandom);
      for (int k = 0; k < 16; k++) begin
        control = 4'(k);
        #1;
        if (k == 0)      exp_y = arith.add_y;
        else if (k == 1) exp_y = arith.sub_y;
        else if (k == 2) exp_y = arith.mul_y;
        else if (k == 3) exp_y = arith.inc_y;
        else if (k == 4) exp_y = arith.dec_y;
        else if (k <= 12) exp_y = {4'b0000, logic_y};
        else exp_y = 8'h00;
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL code=%0d y=%h exp=%h", k, y, exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
