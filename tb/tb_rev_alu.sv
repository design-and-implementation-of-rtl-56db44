// tb_rev_alu: end-to-end self-checking test of the reversible ALU.
//
// Resets the ALU, then applies every combination of control code, a and b
// (4096 operations), a new one on every clock, and checks each result one
// clock later against an integer reference model. The two worked examples
// (0101 + 0110 = 1011 and 0010 + 0011 = 0101) are run first. It counts how
// often each operation code ran, plus an add with carry out, a subtract with
// borrow, a decrement of 0 and a reset; any that never happened counts as a
// failure. The one-cycle latency is checked by sampling y on the edge after
// the operands were applied.
module tb_rev_alu;
  logic       clk = 1'b0, rst_n;
  logic [3:0] a, b, control;
  logic [7:0] y;
  int checks = 0, failures = 0;
  int op_count[16];
  int n_carry = 0, n_borrow = 0, n_dec0 = 0, n_reset = 0;

  rev_alu dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .control(control), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_alu(input int k, input int x, input int z);
    int r;
    r = 0;
    case (k)
      0:  r = x + z;
      1:  r = (x - z + 16) % 32;
      2:  r = x * z;
      3:  r = x + 1;
      4:  r = (x + 15) % 32;
      5:  r = x & z;
      6:  r = x ^ z;
      7:  r = 15 - (x ^ z);
      8:  r = 15 - z;
      9:  r = 15 - (x & z);
      10: r = 15 - x;
      11: r = x | z;
      12: r = 15 - (x | z);
      default: r = 0;
    endcase
    return r;
  endfunction

  // Apply one operation before a rising edge, check its result after it.
  task automatic run_op(input int k, input int x, input int z);
    int exp_y;
    control = 4'(k); a = 4'(x); b = 4'(z);
    exp_y = ref_alu(k, x, z);
    @(posedge clk); #1;
    checks++;
    if (int'(y) != exp_y) begin
      failures++;
      $display("FAIL control=%b a=%b b=%b y=%b exp=%0d", control, a, b, y, exp_y);
    end
    op_count[k]++;
    if (k == 0 && x + z > 15) n_carry++;
    if (k == 1 && x < z)      n_borrow++;
    if (k == 4 && x == 0)     n_dec0++;
  endtask

  initial begin
    rst_n = 1'b0; a = 4'hF; b = 4'hF; control = 4'b0010;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (y !== 8'h00) begin failures++; $display("FAIL reset y=%h", y); end
    else n_reset++;
    rst_n = 1'b1;

    // Worked examples: control 0000 is addition.
    run_op(0, 4'b0101, 4'b0110);
    checks++;
    if (y !== 8'b0000_1011) begin failures++; $display("FAIL example 1 y=%b", y); end
    run_op(0, 4'b0010, 4'b0011);
    checks++;
    if (y !== 8'b0000_0101) begin failures++; $display("FAIL example 2 y=%b", y); end

    for (int k = 0; k < 16; k++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          run_op(k, i, j);

    // Every operation and event must have occurred.
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (op_count[k] == 0) begin failures++; $display("FAIL code %0d never ran", k); end
    end
    checks++; if (n_carry  == 0) begin failures++; $display("FAIL no add carry"); end
    checks++; if (n_borrow == 0) begin failures++; $display("FAIL no borrow"); end
    checks++; if (n_dec0   == 0) begin failures++; $display("FAIL no decrement of 0"); end
    checks++; if (n_reset  == 0) begin failures++; $display("FAIL no reset"); end
    $display("ops per code: add=%0d sub=%0d mul=%0d inc=%0d dec=%0d logic=%0d unused=%0d",
             op_count[0], op_count[1], op_count[2], op_count[3], op_count[4],
             op_count[5] + op_count[6] + op_count[7] + op_count[8] + op_count[9] +
             op_count[10] + op_count[11] + op_count[12],
             op_count[13] + op_count[14] + op_count[15]);
    $display("events: add_carry=%0d sub_borrow=%0d dec_of_zero=%0d reset=%0d",
             n_carry, n_borrow, n_dec0, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
