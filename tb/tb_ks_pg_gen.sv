// tb_ks_pg_gen: self-checking test of the pre-processing step.
//
// Random 128-bit operands and both carry-in values are applied. Each bit is
// checked against a one-bit full-adder view: p_i must be 1 when exactly one
// operand bit is set, g_i when both are; bit 0 must also generate when it
// propagates and the carry-in is set.
module tb_ks_pg_gen;
  import ks_pkg::*;

  localparam int unsigned W = 128;

  logic [W-1:0] a, b, p;
  logic         cin;
  gp_t  [W-1:0] gp;
  int checks = 0, failures = 0;

  ks_pg_gen #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .p(p), .gp(gp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      a   = {$urandom, $urandom, $urandom, $urandom};
      b   = {$urandom, $urandom, $urandom, $urandom};
      cin = n[0];
      #1;
      for (int i = 0; i < W; i++) begin
        int ones;
        logic exp_p, exp_g;
        ones  = int'(a[i]) + int'(b[i]);
        exp_p = (ones == 1);
        exp_g = (ones == 2) || (i == 0 && ones == 1 && cin);
        checks++;
        if (p[i] !== exp_p || gp[i].p !== exp_p || gp[i].g !== exp_g) begin
          failures++;
          if (failures < 10)
            $display("FAIL bit %0d a=%b b=%b cin=%b: p=%b gp=(%b,%b)",
                     i, a[i], b[i], cin, p[i], gp[i].g, gp[i].p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
