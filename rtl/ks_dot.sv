// ks_dot: the dot operator ("black node") of a parallel prefix adder.
//
// It merges the (g,p) pair of a higher bit group `hi` with the pair of the
// adjacent lower group `lo` into the pair of the joined group:
//   o.g = hi.g | (hi.p & lo.g)
//   o.p = hi.p & lo.p
// The higher group makes a carry if it generates one itself or if it passes
// on the one the lower group makes. The equations are the document's.
// Purely combinational: no clock, no state, one AND-OR level and one AND.
module ks_dot
  import ks_pkg::*;
(
  input  gp_t hi,  // (g_in1, p_in1): the node's own column
  input  gp_t lo,  // (g_in2, p_in2): the column 2^(l-1) places lower
  output gp_t o    // (g_out, p_out)
);

  always_comb begin
    o.g = hi.g | (hi.p & lo.g);
    o.p = hi.p & lo.p;
  end

endmodule
