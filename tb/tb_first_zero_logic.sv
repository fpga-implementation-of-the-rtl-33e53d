// tb_first_zero_logic: self-checking test of the first zero finding logic.
//
// Every value of the carry-in-0 sum s0, of its carry out cout0 and of the
// carry input is applied. Expected: with cin = 0 the sum and carry pass
// unchanged; with cin = 1 the sum is s0+1 (modulo 2^WIDTH) and the carry out
// is set when s0 was all ones. grp_p must be 1 exactly for s0 all ones. The
// block is combinational; each vector is checked 1 time unit after it is
// applied. A watchdog ends a hung run with a failure.
module tb_first_zero_logic;

  localparam int W = 4;

  int checks   = 0;
  int failures = 0;

  logic [W-1:0] s0, sum;
  logic         cout0, cin, cout, grp_p;

  first_zero_logic dut (
    .s0(s0), .cout0(cout0), .cin(cin), .sum(sum), .cout(cout), .grp_p(grp_p)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0]   inc;
    logic [W-1:0] exp_sum;
    logic         exp_cout;
    for (int v = 0; v < (1 << (W + 2)); v++) begin
      {cin, cout0, s0} = (W+2)'(v);
      #1;
      inc      = (W+1)'(s0) + (W+1)'(cin);
      exp_sum  = inc[W-1:0];
      exp_cout = cout0 | inc[W];
      checks++;
      if (sum !== exp_sum || cout !== exp_cout) begin
        failures++;
        $display("FAIL s0=%b cout0=%b cin=%b: got %b/%b exp %b/%b",
                 s0, cout0, cin, cout, sum, exp_cout, exp_sum);
      end
      checks++;
      if (grp_p !== (s0 == '1)) begin
        failures++;
        $display("FAIL grp_p for s0=%b: got %b", s0, grp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
