// tb_csa_group: self-checking test of one 4-bit carry select group.
//
// Every combination of a, b and cin is applied. The sum and carry out must
// equal a+b+cin; the product terms must match their definitions computed
// here from the operands: grp_g = (a+b overflows), grp_p = (a^b all ones).
// Combinational; each vector is checked 1 time unit after it is applied.
// A watchdog ends a hung run with a failure.
module tb_csa_group;

  int checks   = 0;
  int failures = 0;

  logic [3:0] a, b, sum;
  logic       cin, cout, grp_g, grp_p;

  csa_group dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .grp_g(grp_g), .grp_p(grp_p)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] exp;
    for (int v = 0; v < (1 << 9); v++) begin
      {cin, a, b} = 9'(v);
      #1;
      exp = 5'(a) + 5'(b) + 5'(cin);
      checks++;
      if ({cout, sum} !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %0d+%0d+%0d: got %0d exp %0d", a, b, cin, {cout, sum}, exp);
      end
      checks++;
      if (grp_g !== ((5'(a) + 5'(b)) > 5'd15) || grp_p !== ((a ^ b) == 4'hf)) begin
        failures++;
        if (failures < 10) $display("FAIL product terms a=%0d b=%0d: g=%b p=%b", a, b, grp_g, grp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
