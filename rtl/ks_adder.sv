// ks_adder: Kogge-Stone parallel prefix adder with carry input.
//
// Each bit forms g = a&b and p = a^b. The carry input is folded into bit 0
// (g0' = g0 | p0&cin), so the prefix of bits i..0 is exactly the carry into
// bit i+1, as in the carry equations C1 = G0 + P0 Cin,
// C2 = (G1 + P1 G0) + P1 P0 Cin, ... The prefix is a Kogge-Stone tree of
// log2(WIDTH) levels (ks_prefix); sum[i] = p[i] ^ c[i].
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
// The 4-bit default is the adder width the design is built from; the
// structure (Kogge-Stone tree, carry equations) follows the description of
// the Kogge-Stone adder, the way cin enters the tree is this design's choice.
module ks_adder
  import csa_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] p;
  gp_t  [WIDTH-1:0] bit_gp;
  gp_t  [WIDTH-1:0] pre_gp;
  logic [WIDTH:0]   c;

  assign p = a ^ b;

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      bit_gp[i].g = a[i] & b[i];
      bit_gp[i].p = p[i];
    end
    // carry input enters as part of bit 0's generate term
    bit_gp[0].g = (a[0] & b[0]) | (p[0] & cin);
  end

  ks_prefix #(.N(WIDTH)) u_tree (
    .in_gp (bit_gp),
    .out_gp(pre_gp)
  );

  always_comb begin
    c[0] = cin;
    for (int i = 0; i < WIDTH; i++) c[i+1] = pre_gp[i].g;
  end

  assign sum  = p ^ c[WIDTH-1:0];
  assign cout = c[WIDTH];

endmodule
