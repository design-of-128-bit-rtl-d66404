// tb_ks_carry_network: self-checking test of the carry generation network.
//
// The expected carry out of bit i is found by walking the (g,p) pairs from
// bit 0 upwards one bit at a time (carry = g_i | p_i & carry), a serial
// computation independent of the prefix tree. Three instances are checked:
//   - 4 bits with the worked example (A = 1001, B = 1100), whose printed
//     carries are C3 = 1, C2 = C1 = C0 = 0,
//   - 128 bits (7 stages) with random pairs and with long propagate runs,
//   - 10 bits, a width that is not a power of two (4 stages).
module tb_ks_carry_network;
  import ks_pkg::*;

  int checks = 0, failures = 0;

  gp_t  [3:0]   q4;
  logic [3:0]   c4;
  gp_t  [127:0] q128;
  logic [127:0] c128;
  gp_t  [9:0]   q10;
  logic [9:0]   c10;

  ks_carry_network #(.WIDTH(4))   u4   (.gp_in(q4),   .c(c4));
  ks_carry_network #(.WIDTH(128)) u128 (.gp_in(q128), .c(c128));
  ks_carry_network #(.WIDTH(10))  u10  (.gp_in(q10),  .c(c10));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] serial_carries(logic [127:0] g, logic [127:0] p, int w);
    logic [127:0] r = '0;
    logic carry = 1'b0;
    for (int i = 0; i < w; i++) begin
      carry = g[i] | (p[i] & carry);
      r[i] = carry;
    end
    return r;
  endfunction

  initial begin
    // Worked example: (P,G) per column 3..0 = 01, 10, 00, 10.
    q4[3] = '{g: 1'b1, p: 1'b0};
    q4[2] = '{g: 1'b0, p: 1'b1};
    q4[1] = '{g: 1'b0, p: 1'b0};
    q4[0] = '{g: 1'b0, p: 1'b1};
    #1;
    checks++;
    if (c4 !== 4'b1000) begin
      failures++;
      $display("FAIL 4-bit example: c=%b expected 1000", c4);
    end

    for (int n = 0; n < 2000; n++) begin
      logic [127:0] rg, rp, exp;
      rp = {$urandom, $urandom, $urandom, $urandom};
      rg = {$urandom, $urandom, $urandom, $urandom};
      if (n % 2 == 1) begin
        // Mostly propagate, a few generates: carries travel far.
        rp = ~({$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom}
              & {$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom});
        rg = ~rp & {$urandom, $urandom, $urandom, $urandom};
        if (n % 4 == 1) begin
          rp = '1;
          rg = '0;
          rg[$urandom_range(0, 15)] = 1'b1;
          rp[$urandom_range(0, 127)] = 1'b0;
        end
      end
      for (int i = 0; i < 128; i++) q128[i] = '{g: rg[i], p: rp[i]};
      for (int i = 0; i < 10; i++)  q10[i]  = '{g: rg[i], p: rp[i]};
      #1;
      exp = serial_carries(rg, rp, 128);
      checks++;
      if (c128 !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL 128-bit: c=%h expected %h", c128, exp);
      end
      exp = serial_carries(rg, rp, 10);
      checks++;
      if (c10 !== exp[9:0]) begin
        failures++;
        if (failures < 10) $display("FAIL 10-bit: c=%b expected %b", c10, exp[9:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
