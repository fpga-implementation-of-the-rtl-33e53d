// csa_group: one group of the carry select adder without multiplexer.
//
// A Kogge-Stone adder adds the group's operand bits with its carry input tied
// to 0. The first zero finding logic then produces the final group sum from
// that result and the group's carry input: unchanged for cin = 0, inverted
// up to the first zero for cin = 1. The group also hands two product terms to
// the fast carry network: grp_g, the carry out of the carry-in-0 adder, and
// grp_p, the AND of its sum bits (1 exactly when every bit propagates).
//
// Interface: a, b, cin in; sum, cout, grp_g, grp_p out. Purely
// combinational; grp_g and grp_p do not depend on cin.
// Structure and the 4-bit group size follow the design description; which
// signals serve as the group's product terms is this design's choice.
module csa_group #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             grp_g,
  output logic             grp_p
);

  logic [WIDTH-1:0] s0;
  logic             cout0;

  ks_adder #(.WIDTH(WIDTH)) u_ks (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (s0),
    .cout(cout0)
  );

  first_zero_logic #(.WIDTH(WIDTH)) u_fzl (
    .s0   (s0),
    .cout0(cout0),
    .cin  (cin),
    .sum  (sum),
    .cout (cout),
    .grp_p(grp_p)
  );

  assign grp_g = cout0;

endmodule
