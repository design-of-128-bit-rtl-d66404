// tb_ks_sum_gen: self-checking test of the post-processing step.
//
// Random propagate and carry vectors and both carry-in values are applied.
// The expected sum bit is 1 when an odd number of {p_i, carry into bit i}
// is set, with the carry into bit 0 being cin.
module tb_ks_sum_gen;
  localparam int unsigned W = 128;

  logic [W-1:0] p, c, s;
  logic         cin;
  int checks = 0, failures = 0;

  ks_sum_gen #(.WIDTH(W)) dut (.p(p), .c(c), .cin(cin), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      p   = {$urandom, $urandom, $urandom, $urandom};
      c   = {$urandom, $urandom, $urandom, $urandom};
      cin = n[1];
      #1;
      for (int i = 0; i < W; i++) begin
        logic cinto, exp_s;
        cinto = (i == 0) ? cin : c[i-1];
        exp_s = (p[i] != cinto);
        checks++;
        if (s[i] !== exp_s) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d: s=%b expected %b", i, s[i], exp_s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
