// ks_carry_network: the carry generation step of the Kogge-Stone adder.
//
// STAGES = log2(WIDTH) prefix stages (7 for 128 bits) run in series; stage l
// (1-based) combines columns 2^(l-1) apart. In stage l the columns from
// 2^(l-1) up hold dot operators and the columns below hold buffers, so the
// last stage of the 128-bit adder has 64 dot operators. After the last stage
// column i holds the group generate of bits [i:0], which is the carry out of
// bit i: c_i = G[i:0]. The carry-in is already merged into bit 0 by the
// pre-processing step. Stage count, distances and c_i = G_i are the
// document's; the columns of the unused propagate outputs of the last stage
// are left without load. STAGES may be raised (extra stages only forward)
// but not lowered below log2(WIDTH); elaboration stops if it is.
// Purely combinational; the depth is STAGES dot operators.
module ks_carry_network
  import ks_pkg::*;
#(
  parameter int unsigned WIDTH  = 128,
  parameter int unsigned STAGES = ks_stages(WIDTH)  // 7 for 128 bits
) (
  input  gp_t  [WIDTH-1:0] gp_in,  // (g,p) per bit from pre-processing
  output logic [WIDTH-1:0] c       // carry out of each bit
);

  // Fewer stages than log2(WIDTH) would leave the upper carries incomplete.
  if (STAGES < ks_stages(WIDTH)) begin : g_bad_stages
    $error("ks_carry_network: STAGES=%0d is below log2(WIDTH)=%0d", STAGES, ks_stages(WIDTH));
  end

  // lvl[0] is the input, lvl[l] the output of stage l.
  gp_t [WIDTH-1:0] lvl [STAGES+1];

  assign lvl[0] = gp_in;

  for (genvar l = 1; l <= STAGES; l++) begin : g_stage
    ks_prefix_stage #(
      .WIDTH(WIDTH),
      .DIST (2 ** (l - 1))
    ) u_stage (
      .gp_in (lvl[l-1]),
      .gp_out(lvl[l])
    );
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_carry
    assign c[i] = lvl[STAGES][i].g;
  end

endmodule
