// fast_carry_ks: fast carry network over the groups of the adder.
//
// Every group supplies a generate term (its carry-in-0 adder overflowed) and
// a propagate term (its carry-in-0 sum is all ones). A Kogge-Stone prefix
// tree over those pairs, with the adder's carry input folded into group 0,
// gives the carry into every group at once: c[k+1] = G[k:0] + P[k:0] cin.
// So no carry ripples from group to group, and the groups' first zero
// finding logic sees its carry after log2(NGROUPS) operator levels.
//
// Interface: grp_g, grp_p (one bit per group), cin in; c out, where c[k] is
// the carry into group k (c[0] = cin) and c[NGROUPS] the adder's carry out.
// Purely combinational. The Kogge-Stone fast carry network follows the
// design description; the default of two groups (an 8-bit adder of 4-bit
// groups) is this design's reading of it.
module fast_carry_ks
  import csa_pkg::*;
#(
  parameter int unsigned NGROUPS = 2
) (
  input  logic [NGROUPS-1:0] grp_g,
  input  logic [NGROUPS-1:0] grp_p,
  input  logic               cin,
  output logic [NGROUPS:0]   c
);

  gp_t [NGROUPS-1:0] in_gp;
  gp_t [NGROUPS-1:0] pre_gp;

  always_comb begin
    for (int k = 0; k < NGROUPS; k++) begin
      in_gp[k].g = grp_g[k];
      in_gp[k].p = grp_p[k];
    end
    in_gp[0].g = grp_g[0] | (grp_p[0] & cin);
  end

  ks_prefix #(.N(NGROUPS)) u_tree (
    .in_gp (in_gp),
    .out_gp(pre_gp)
  );

  always_comb begin
    c[0] = cin;
    for (int k = 0; k < NGROUPS; k++) c[k+1] = pre_gp[k].g;
  end

endmodule
