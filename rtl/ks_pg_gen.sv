// ks_pg_gen: pre-processing step of the Kogge-Stone adder (the "square boxes").
//
// For every bit i it forms the propagate p_i = a_i ^ b_i and the generate
// g_i = a_i & b_i, as the document gives them. The pair goes into the carry
// network; p is also passed out on its own for the final sum XOR.
// The carry-in enters the square box of bit 0, as the document's 128-bit
// block diagram draws it. How it enters is not given; here it is folded
// into the generate of bit 0, g_0 = a_0 & b_0 | (a_0 ^ b_0) & cin, so that
// every carry leaving the network already includes it (this design's choice).
// Purely combinational.
module ks_pg_gen
  import ks_pkg::*;
#(
  parameter int unsigned WIDTH = 128  // operand width, 128 in the document
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] p,         // a ^ b per bit
  output gp_t  [WIDTH-1:0] gp         // (g,p) per bit into the prefix network
);

  always_comb begin
    p = a ^ b;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      gp[i].p = p[i];
      gp[i].g = a[i] & b[i];
    end
    gp[0].g = (a[0] & b[0]) | (p[0] & cin);
  end

endmodule
