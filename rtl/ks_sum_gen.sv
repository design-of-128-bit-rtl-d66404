// ks_sum_gen: post-processing step of the Kogge-Stone adder.
//
// Each sum bit is the bit propagate XOR the carry into that bit:
// s_i = p_i ^ c_(i-1) for i > 0 and s_0 = p_0 ^ cin, as the document gives
// it. The carry out of the top bit, c[WIDTH-1], feeds no sum bit; it is the
// adder's carry out and leaves through the top level instead.
// Purely combinational, one XOR level.
module ks_sum_gen #(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] p,    // a ^ b per bit
  input  logic [WIDTH-1:0] c,    // carry out of each bit
  input  logic             cin,  // carry into bit 0
  output logic [WIDTH-1:0] s
);

  always_comb begin
    s[0] = p[0] ^ cin;
    for (int unsigned i = 1; i < WIDTH; i++) s[i] = p[i] ^ c[i-1];
  end

endmodule
