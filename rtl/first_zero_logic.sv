// first_zero_logic: turns the carry-in-0 sum of a group into the sum for the
// group's real carry input, without a second adder and without a multiplexer.
//
// Adding 1 to a number inverts its bits from the LSB up to and including the
// first zero. An AND chain does this: t[0] = cin, t[i+1] = t[i] & s0[i], and
// sum[i] = s0[i] ^ t[i]. With cin = 0 every t is 0 and the carry-in-0 sum
// passes unchanged; with cin = 1 the chain stays high across the trailing
// ones and dies at the first zero. If s0 is all ones the chain runs out of
// the top and becomes a carry out: cout = cout0 | t[WIDTH].
//
// The running products of s0 (pp[i] = s0[i-1] & ... & s0[0]) are formed
// without cin, so pp[WIDTH] is also the group's propagate term for the fast
// carry network (s0 all ones happens exactly when every bit propagates).
//
// Interface: s0, cout0 (carry-in-0 result of the group's adder), cin in;
// sum, cout, grp_p out. Purely combinational. The select-by-inversion rule is
// the design's defining idea; the gate-level form of the chain is this
// design's choice.
module first_zero_logic #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] s0,
  input  logic             cout0,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             grp_p
);

  logic [WIDTH:0] pp;  // pp[i] = AND of s0[i-1:0]
  logic [WIDTH:0] t;   // t[i]  = cin & pp[i]: invert bit i

  assign pp[0] = 1'b1;
  for (genvar i = 0; i < WIDTH; i++) begin : g_chain
    assign pp[i+1] = pp[i] & s0[i];
  end

  assign t     = {(WIDTH+1){cin}} & pp;
  assign sum   = s0 ^ t[WIDTH-1:0];
  assign cout  = cout0 | t[WIDTH];
  assign grp_p = pp[WIDTH];

endmodule
