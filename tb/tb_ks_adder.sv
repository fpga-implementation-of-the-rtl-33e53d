// tb_ks_adder: self-checking test of the Kogge-Stone adder.
//
// Two instances: the 4-bit default and an 8-bit one (a tree of three prefix
// levels). Both are driven with every combination of a, b and cin, and sum
// and carry out are compared with a+b+cin worked out by the testbench's own
// arithmetic. The adder is combinational: each vector is checked 1 time unit
// after it is applied. A watchdog ends the run with a failure if it hangs.
module tb_ks_adder;

  int checks   = 0;
  int failures = 0;

  logic [3:0] a4, b4, s4;
  logic       c4, co4;
  logic [7:0] a8, b8, s8;
  logic       c8, co8;

  ks_adder dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  ks_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(c8), .sum(s8), .cout(co8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] exp4;
    logic [8:0] exp8;
    for (int v = 0; v < (1 << 9); v++) begin
      {c4, a4, b4} = 9'(v);
      #1;
      exp4 = 5'(a4) + 5'(b4) + 5'(c4);
      checks++;
      if ({co4, s4} !== exp4) begin
        failures++;
        if (failures < 10) $display("FAIL 4-bit %0d+%0d+%0d: got %0d exp %0d", a4, b4, c4, {co4, s4}, exp4);
      end
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {c8, a8, b8} = 17'(v);
      #1;
      exp8 = 9'(a8) + 9'(b8) + 9'(c8);
      checks++;
      if ({co8, s8} !== exp8) begin
        failures++;
        if (failures < 10) $display("FAIL 8-bit %0d+%0d+%0d: got %0d exp %0d", a8, b8, c8, {co8, s8}, exp8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
