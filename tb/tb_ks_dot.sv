// tb_ks_dot: exhaustive self-checking test of the dot operator.
//
// All 16 combinations of the two (g,p) input pairs are applied and the output
// is compared with the truth table of g = g1 | p1 & g2, p = p1 & p2, written
// out here case by case rather than with the operator's own expression.
module tb_ks_dot;
  import ks_pkg::*;

  gp_t hi, lo, o;
  int checks = 0, failures = 0;

  ks_dot dut (.hi(hi), .lo(lo), .o(o));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_g, exp_p;
    for (int v = 0; v < 16; v++) begin
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      #1;
      // Truth table: a group generates if the high half generates, or if the
      // high half propagates and the low half generates.
      unique case ({hi.g, hi.p, lo.g})
        3'b000, 3'b001, 3'b010: exp_g = 1'b0;
        3'b011:                 exp_g = 1'b1;
        default:                exp_g = 1'b1;  // hi.g = 1
      endcase
      exp_p = (hi.p == 1'b1 && lo.p == 1'b1);
      checks++;
      if (o.g !== exp_g || o.p !== exp_p) begin
        failures++;
        $display("FAIL hi=(%b,%b) lo=(%b,%b): got (%b,%b) expected (%b,%b)",
                 hi.g, hi.p, lo.g, lo.p, o.g, o.p, exp_g, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
