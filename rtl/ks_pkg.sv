// ks_pkg: types shared by the Kogge-Stone adder.
//
// A prefix adder moves (generate, propagate) pairs through its carry
// network. gp_t bundles one such pair so that a column of the network is a
// single signal. The pair is the one of the dot operator
// (g_out, p_out) = (g_in1 + p_in1 & g_in2, p_in1 & p_in2).
package ks_pkg;

  // One (generate, propagate) pair: g = the bit group makes a carry,
  // p = the bit group passes an incoming carry through.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Number of prefix stages for a given width: log2 of the width, rounded up.
  function automatic int unsigned ks_stages(int unsigned width);
    return $clog2(width);
  endfunction

endpackage
