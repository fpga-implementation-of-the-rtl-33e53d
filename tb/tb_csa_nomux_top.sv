// tb_csa_nomux_top: end-to-end test of the carry select adder without
// multiplexer at its default size (8 bits, two 4-bit groups).
//
// Every combination of a, b and cin (2^17 vectors) is applied, and sum and
// carry out are compared with a+b+cin. Alongside, the testbench works out
// from the operands which mechanism each vector exercises and counts it:
//   pass      a group whose carry input is 0 keeps its Kogge-Stone sum
//   invert    a group with carry input 1 inverts up to a zero inside it
//   overflow  a group with carry input 1 whose carry-in-0 sum is all ones,
//             so the inversion runs out of the group as a carry
//   generate  the fast carry network delivers a carry generated by group 0
//   propagate the fast carry network carries cin across group 0
// A mechanism that never happens counts as a failure. Combinational; each
// vector is checked 1 time unit after it is applied. A watchdog ends a hung
// run with a failure.
module tb_csa_nomux_top;

  localparam int W  = 8;
  localparam int GW = 4;
  localparam int NG = W / GW;

  int checks   = 0;
  int failures = 0;
  int n_pass = 0, n_invert = 0, n_overflow = 0, n_generate = 0, n_propagate = 0;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;

  csa_nomux_top dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_mechanisms();
    logic          carry;
    logic [GW:0]   s0;
    logic [GW-1:0] ga, gb;
    carry = cin;
    for (int k = 0; k < NG; k++) begin
      ga = a[k*GW +: GW];
      gb = b[k*GW +: GW];
      s0 = (GW+1)'(ga) + (GW+1)'(gb);
      if (!carry)                       n_pass++;
      else if (s0[GW-1:0] != '1)        n_invert++;
      else                              n_overflow++;
      if (k == 0 && s0[GW])                           n_generate++;
      if (k == 0 && cin && s0 == {1'b0, {GW{1'b1}}})  n_propagate++;
      carry = s0[GW] | (carry & (s0[GW-1:0] == '1));
    end
  endtask

  initial begin
    logic [W:0] exp;
    for (int v = 0; v < (1 << (2*W + 1)); v++) begin
      {cin, a, b} = (2*W+1)'(v);
      #1;
      exp = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
      checks++;
      if ({cout, sum} !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %0d+%0d+%0d: got %0d exp %0d", a, b, cin, {cout, sum}, exp);
      end
      count_mechanisms();
    end
    $display("mechanisms: pass=%0d invert=%0d overflow=%0d generate=%0d propagate=%0d",
             n_pass, n_invert, n_overflow, n_generate, n_propagate);
    if (n_pass == 0)      begin failures++; $display("FAIL: pass never happened"); end
    if (n_invert == 0)    begin failures++; $display("FAIL: invert never happened"); end
    if (n_overflow == 0)  begin failures++; $display("FAIL: overflow never happened"); end
    if (n_generate == 0)  begin failures++; $display("FAIL: generate never happened"); end
    if (n_propagate == 0) begin failures++; $display("FAIL: propagate never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
