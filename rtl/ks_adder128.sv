// ks_adder128: 128-bit Kogge-Stone parallel prefix adder.
//
// It adds a + b + cin in the three steps of a prefix adder:
//   1. ks_pg_gen        bit propagate p = a ^ b and generate g = a & b
//                       (cin merged into the generate of bit 0),
//   2. ks_carry_network log2(WIDTH) = 7 prefix stages of dot operators and
//                       buffers that turn the bit pairs into the carries
//                       c_i = G[i:0],
//   3. ks_sum_gen       s_i = p_i ^ c_(i-1).
// Outputs are the 128 sum bits s and the 128 carries c; c[WIDTH-1] is the
// carry out, so the full result is {c[WIDTH-1], s}. The port names a, b, s, c,
// the width, the stage count and the node equations follow the document; the
// carry-in port and the way it enters bit 0 are this design's choices.
// Timing: purely combinational, no clock and no latency in cycles. The
// critical path is one AND/XOR, seven dot operators and one XOR.
module ks_adder128
  import ks_pkg::*;
#(
  parameter int unsigned WIDTH = 128  // operand width, 128 in the document
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c
);

  logic [WIDTH-1:0] p;
  gp_t  [WIDTH-1:0] gp;

  ks_pg_gen #(.WIDTH(WIDTH)) u_pg (
    .a  (a),
    .b  (b),
    .cin(cin),
    .p  (p),
    .gp (gp)
  );

  ks_carry_network #(.WIDTH(WIDTH)) u_carry (
    .gp_in(gp),
    .c    (c)
  );

  ks_sum_gen #(.WIDTH(WIDTH)) u_sum (
    .p  (p),
    .c  (c),
    .cin(cin),
    .s  (s)
  );

endmodule
