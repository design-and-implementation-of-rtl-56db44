// tb_out_reg: self-checking test of the output register.
// Checks that reset clears it, that q holds d from the last rising edge and
// does not change between edges, over 200 random values.
module tb_out_reg;
  logic       clk = 1'b0, rst_n;
  logic [7:0] d, q, prev;
  int checks = 0, failures = 0;

  out_reg dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; d = 8'hA5;
    @(posedge clk); #1;
    checks++;
    if (q !== 8'h00) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      prev = 8'($urandom);
      d = prev;
      @(posedge clk); #1;
      d = ~prev;  // changing d between edges must not reach q
      #2;
      checks++;
      if (q !== prev) begin failures++; $display("FAIL q=%h exp=%h", q, prev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
