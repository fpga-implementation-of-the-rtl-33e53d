// tb_fast_carry_ks: self-checking test of the group-level fast carry network.
//
// Two instances: the default of 2 groups and one of 5 groups (not a power of
// two, three prefix levels). Every combination of group generate, group
// propagate and carry input is applied, and every carry is compared with a
// group-by-group ripple, c[k+1] = g[k] | p[k] & c[k], computed here.
// Combinational; each vector is checked 1 time unit after it is applied.
// A watchdog ends a hung run with a failure.
module tb_fast_carry_ks;

  int checks   = 0;
  int failures = 0;

  logic [1:0] g2, p2;
  logic       cin2;
  logic [2:0] c2;
  logic [4:0] g5, p5;
  logic       cin5;
  logic [5:0] c5;

  fast_carry_ks dut2 (.grp_g(g2), .grp_p(p2), .cin(cin2), .c(c2));
  fast_carry_ks #(.NGROUPS(5)) dut5 (.grp_g(g5), .grp_p(p5), .cin(cin5), .c(c5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e2;
    logic [5:0] e5;
    for (int v = 0; v < (1 << 5); v++) begin
      {cin2, g2, p2} = 5'(v);
      #1;
      e2[0] = cin2;
      for (int k = 0; k < 2; k++) e2[k+1] = g2[k] | (p2[k] & e2[k]);
      checks++;
      if (c2 !== e2) begin
        failures++;
        $display("FAIL 2 groups g=%b p=%b cin=%b: got %b exp %b", g2, p2, cin2, c2, e2);
      end
    end
    for (int v = 0; v < (1 << 11); v++) begin
      {cin5, g5, p5} = 11'(v);
      #1;
      e5[0] = cin5;
      for (int k = 0; k < 5; k++) e5[k+1] = g5[k] | (p5[k] & e5[k]);
      checks++;
      if (c5 !== e5) begin
        failures++;
        if (failures < 10) $display("FAIL 5 groups g=%b p=%b cin=%b: got %b exp %b", g5, p5, cin5, c5, e5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
