// ks_prefix: Kogge-Stone parallel prefix tree over N generate/propagate pairs.
//
// Output i is the combined pair of inputs i down to 0. The tree has
// ceil(log2 N) levels; at level l every position i >= 2^l combines with the
// position 2^l below it, and the others pass straight through. This is the
// full-fan-out, minimum-depth tree of the Kogge-Stone adder: depth log2(N),
// about N*log2(N) operators. Purely combinational.
//
// Helper used by ks_adder (bit level) and fast_carry_ks (group level).
module ks_prefix
  import csa_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  gp_t [N-1:0] in_gp,
  output gp_t [N-1:0] out_gp
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  gp_t [N-1:0] lvl [LEVELS+1];

  assign lvl[0] = in_gp;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned DIST = 1 << l;
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i >= DIST) begin : g_dot
        assign lvl[l+1][i] = gp_combine(lvl[l][i], lvl[l][i-DIST]);
      end else begin : g_pass
        assign lvl[l+1][i] = lvl[l][i];
      end
    end
  end

  assign out_gp = lvl[LEVELS];

endmodule
