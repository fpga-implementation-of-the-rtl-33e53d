// csa_nomux_top: carry select adder without multiplexer, WIDTH bits.
//
// The operands are cut into groups of GROUP_W bits. Each group (csa_group)
// adds its bits with a Kogge-Stone adder whose carry input is 0 and keeps
// that result or turns it into the carry-in-1 result with the first zero
// finding logic, instead of a second adder and a sum multiplexer. Each group
// also gives its generate/propagate product terms to a Kogge-Stone fast carry
// network (fast_carry_ks), which returns the carry into every group; the
// carry input of the adder is the carry into group 0 and the network's last
// carry is the carry out.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout out. Purely
// combinational, no clock: sum and cout settle one adder delay after the
// inputs change.
//
// Following the description: the Kogge-Stone adder with carry input 0, the
// first zero finding logic, 4-bit groups feeding product terms to a
// Kogge-Stone fast carry network. This design's own choices: the default
// width of 8 bits (the width of the carry equations C1..C8 given for the
// Kogge-Stone adder), and the group product terms used.
module csa_nomux_top #(
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned GROUP_W = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NGROUPS = WIDTH / GROUP_W;

  if (NGROUPS * GROUP_W != WIDTH || NGROUPS == 0) begin : g_bad_width
    $error("csa_nomux_top: WIDTH must be a positive multiple of GROUP_W");
  end

  logic [NGROUPS-1:0] grp_g;
  logic [NGROUPS-1:0] grp_p;
  logic [NGROUPS:0]   c;

  for (genvar k = 0; k < NGROUPS; k++) begin : g_group
    logic grp_cout;  // the group's own carry out; the network's c[k+1] is used

    csa_group #(.WIDTH(GROUP_W)) u_grp (
      .a    (a[k*GROUP_W +: GROUP_W]),
      .b    (b[k*GROUP_W +: GROUP_W]),
      .cin  (c[k]),
      .sum  (sum[k*GROUP_W +: GROUP_W]),
      .cout (grp_cout),
      .grp_g(grp_g[k]),
      .grp_p(grp_p[k])
    );

    // the group's local carry out and the fast network must agree
    always_comb begin
      assert (grp_cout == c[k+1])
        else $error("group %0d carry out disagrees with fast carry network", k);
    end
  end

  fast_carry_ks #(.NGROUPS(NGROUPS)) u_fast_carry (
    .grp_g(grp_g),
    .grp_p(grp_p),
    .cin  (cin),
    .c    (c)
  );

  assign cout = c[NGROUPS];

endmodule
