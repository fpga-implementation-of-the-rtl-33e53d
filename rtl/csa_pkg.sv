// csa_pkg: types and the prefix operator shared by the two Kogge-Stone trees
// of the carry select adder.
//
// A prefix tree works on generate/propagate pairs. Bit i of an adder has
// g = a&b and p = a^b; a span of bits has G (it produces a carry by itself)
// and P (it passes an incoming carry through). Two adjacent spans combine as
//   (G_hi, P_hi) o (G_lo, P_lo) = (G_hi | P_hi & G_lo, P_hi & P_lo),
// which is the step the carry equations of a Kogge-Stone adder repeat
// (C2 = G1 + P1 G0 + P1 P0 Cin and so on). The same operator serves the
// bit-level adder and the group-level fast carry network.
package csa_pkg;

  typedef struct packed {
    logic g;  // span generates a carry
    logic p;  // span propagates an incoming carry
  } gp_t;

  // Prefix ("dot") operator: hi is the more significant span.
  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
