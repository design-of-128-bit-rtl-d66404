// ks_prefix_stage: one stage of the Kogge-Stone carry network.
//
// Stage l works at distance DIST = 2^(l-1). Every column i >= DIST holds a
// dot operator (black node) that merges its own (g,p) pair with the pair of
// column i-DIST; every column i < DIST holds a buffer (white node) that
// forwards its pair unchanged. After stage l, column i holds the (g,p) of the
// bit group [i : max(0, i-2^l+1)]. The rule that the black nodes start at
// column 2^(l-1) and the white nodes fill the columns below follows the
// document; the buffers are plain wires here.
// Purely combinational.
module ks_prefix_stage
  import ks_pkg::*;
#(
  parameter int unsigned WIDTH = 128,  // number of columns
  parameter int unsigned DIST  = 1     // stage distance 2^(l-1)
) (
  input  gp_t [WIDTH-1:0] gp_in,
  output gp_t [WIDTH-1:0] gp_out
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_col
    if (i >= DIST) begin : g_black
      ks_dot u_dot (
        .hi(gp_in[i]),
        .lo(gp_in[i-DIST]),
        .o (gp_out[i])
      );
    end else begin : g_white
      assign gp_out[i] = gp_in[i];
    end
  end

endmodule
