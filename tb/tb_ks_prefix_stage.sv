// tb_ks_prefix_stage: self-checking test of one Kogge-Stone prefix stage.
//
// Part 1 rebuilds the two stages of the 4-bit worked example (A = 1001,
// B = 1100, carry-in 0) and checks every node's (P,G) against the values
// printed for it: after stage 1 columns 3..0 hold (P,G) = 01, 00, 00, 10,
// after stage 2 the same. Part 2 drives a 128-column stage at distance 16
// with random pairs and compares each column with the merge of columns i and
// i-16 worked out here, or with the unchanged pair below column 16.
module tb_ks_prefix_stage;
  import ks_pkg::*;

  int checks = 0, failures = 0;

  // ---- part 1: 4-bit example, stages at distance 1 and 2 ----
  gp_t [3:0] x0, x1, x2;

  ks_prefix_stage #(.WIDTH(4), .DIST(1)) u_s1 (.gp_in(x0), .gp_out(x1));
  ks_prefix_stage #(.WIDTH(4), .DIST(2)) u_s2 (.gp_in(x1), .gp_out(x2));

  // ---- part 2: 128 columns at distance 16 ----
  localparam int unsigned W = 128;
  localparam int unsigned D = 16;
  gp_t [W-1:0] y_in, y_out;

  ks_prefix_stage #(.WIDTH(W), .DIST(D)) u_big (.gp_in(y_in), .gp_out(y_out));

  task automatic check_pg(string what, gp_t got, logic exp_p, logic exp_g);
    checks++;
    if (got.p !== exp_p || got.g !== exp_g) begin
      failures++;
      $display("FAIL %s: (P,G)=(%b,%b) expected (%b,%b)", what, got.p, got.g, exp_p, exp_g);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Square boxes of the example, (P,G) per column 3..0: 01, 10, 00, 10.
    x0[3] = '{g: 1'b1, p: 1'b0};
    x0[2] = '{g: 1'b0, p: 1'b1};
    x0[1] = '{g: 1'b0, p: 1'b0};
    x0[0] = '{g: 1'b0, p: 1'b1};
    #1;
    check_pg("stage1 col3", x1[3], 1'b0, 1'b1);
    check_pg("stage1 col2", x1[2], 1'b0, 1'b0);
    check_pg("stage1 col1", x1[1], 1'b0, 1'b0);
    check_pg("stage1 col0", x1[0], 1'b1, 1'b0);
    check_pg("stage2 col3", x2[3], 1'b0, 1'b1);
    check_pg("stage2 col2", x2[2], 1'b0, 1'b0);
    check_pg("stage2 col1", x2[1], 1'b0, 1'b0);
    check_pg("stage2 col0", x2[0], 1'b1, 1'b0);

    for (int n = 0; n < 300; n++) begin
      logic [W-1:0] rg, rp;
      rg = {$urandom, $urandom, $urandom, $urandom};
      rp = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < W; i++) y_in[i] = '{g: rg[i], p: rp[i]};
      #1;
      for (int i = 0; i < W; i++) begin
        logic eg, ep;
        if (i < D) begin
          eg = rg[i];
          ep = rp[i];
        end else begin
          // Joined group [i .. i-2D+1]: generates if the upper half does or
          // the upper half passes what the lower half generates.
          eg = rg[i] ? 1'b1 : (rp[i] ? rg[i-D] : 1'b0);
          ep = rp[i] ? rp[i-D] : 1'b0;
        end
        check_pg($sformatf("d16 col%0d", i), y_out[i], ep, eg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
