// tb_ks_adder128: end-to-end self-checking test of the 128-bit adder at its
// default size.
//
// Reference: the 129-bit result a + b + cin from the simulator's own
// arithmetic. The expected sum is its low 128 bits; the expected carry out of
// bit i is the carry into bit i+1, recovered as ref[i+1] ^ a[i+1] ^ b[i+1],
// and c[127] must equal ref[128].
//
// Vectors: the operands of the document's simulation (a = b = 2^127, which
// must give s = 0 and c = 2^127), the 4-bit worked example zero-extended
// (1001 + 1100), corner values, random operands, and operands built with long
// propagate runs so that carries cross up to the full width.
//
// Mechanisms counted, each of which must occur at least once:
//   - a carry-in that becomes a carry (cin = 1 and bit 0 propagates),
//   - a carry out of the top bit,
//   - for each prefix stage l = 1..7, a carry that travels at least
//     2^(l-1) bit positions from where it was generated, which only stage l
//     and above can deliver.
// The adder is combinational, so outputs are sampled 1 time unit after the
// inputs change; no cycle latency applies.
module tb_ks_adder128;
  localparam int unsigned W = 128;
  localparam int unsigned STAGES = 7;

  logic [W-1:0] a, b, s, c;
  logic         cin;

  int checks = 0, failures = 0;
  int n_cin_used = 0, n_cout = 0;
  int n_reach [STAGES+1];

  ks_adder128 dut (.a(a), .b(b), .cin(cin), .s(s), .c(c));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Longest distance any carry travels: from the generating bit j (or the
  // carry-in, j = -1) to the highest bit i it leaves, i - j.
  function automatic int longest_carry(logic [W-1:0] x, logic [W-1:0] y, logic ci);
    int origin = ci ? -1 : -2;  // -2: no live carry
    int best = 0;
    for (int i = 0; i < W; i++) begin
      if (x[i] & y[i])            origin = i;
      else if (!(x[i] ^ y[i]))    origin = -2;
      if (origin != -2 && i - origin > best) best = i - origin;
    end
    return best;
  endfunction

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic ci, string tag);
    logic [W:0]   ref_sum;
    logic [W-1:0] exp_c;
    int           reach;
    a = x; b = y; cin = ci;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, ci};
    for (int i = 0; i < W - 1; i++) exp_c[i] = ref_sum[i+1] ^ x[i+1] ^ y[i+1];
    exp_c[W-1] = ref_sum[W];
    checks++;
    if (s !== ref_sum[W-1:0] || c !== exp_c) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: a=%h b=%h cin=%b\n  s=%h exp %h\n  c=%h exp %h",
                 tag, x, y, ci, s, ref_sum[W-1:0], c, exp_c);
    end
    if (ci && (x[0] ^ y[0])) n_cin_used++;
    if (ref_sum[W]) n_cout++;
    reach = longest_carry(x, y, ci);
    for (int l = 1; l <= STAGES; l++) if (reach >= (1 << (l - 1))) n_reach[l]++;
  endtask

  initial begin
    for (int l = 0; l <= STAGES; l++) n_reach[l] = 0;

    // The document's simulation: 100...0 + 100...0.
    apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, 1'b0, "document vector");
    checks++;
    if (s !== '0 || c !== {1'b1, {(W-1){1'b0}}}) begin
      failures++;
      $display("FAIL document vector: s=%h c=%h", s, c);
    end

    // 4-bit worked example, zero-extended: 1001 + 1100 = 1_0101, C3..C0 = 1000.
    apply(W'(4'b1001), W'(4'b1100), 1'b0, "4-bit example");
    checks++;
    if (s[4:0] !== 5'b10101 || c[3:0] !== 4'b1000) begin
      failures++;
      $display("FAIL 4-bit example: s=%b c=%b", s[4:0], c[3:0]);
    end

    // Corners.
    apply('0, '0, 1'b0, "zero");
    apply('0, '0, 1'b1, "zero+cin");
    apply('1, '0, 1'b1, "all propagate from cin");
    apply('1, '1, 1'b1, "all ones");
    apply('1, W'(1), 1'b0, "carry from bit 0 to out");
    apply({1'b0, {(W-1){1'b1}}}, W'(1), 1'b0, "max positive + 1");

    for (int n = 0; n < 20000; n++) begin
      logic [W-1:0] x, y, keep;
      x = rnd();
      case (n % 4)
        0: y = rnd();
        1: y = ~x;                 // all propagate, carry only from cin
        default: begin
          // Propagate everywhere except a few random bits.
          keep = rnd() & rnd() & rnd() & rnd();
          y = (~x & ~keep) | (x & keep & rnd());
        end
      endcase
      apply(x, y, 1'($urandom), "random");
    end

    if (n_cin_used == 0) begin
      failures++;
      $display("FAIL carry-in never produced a carry");
    end
    if (n_cout == 0) begin
      failures++;
      $display("FAIL no carry out was produced");
    end
    for (int l = 1; l <= STAGES; l++) begin
      $display("stage %0d: %0d vectors with a carry travelling >= %0d bits", l, n_reach[l], 1 << (l - 1));
      if (n_reach[l] == 0) begin
        failures++;
        $display("FAIL no carry needed stage %0d", l);
      end
    end
    $display("carry-in used %0d times, carry out %0d times", n_cin_used, n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
