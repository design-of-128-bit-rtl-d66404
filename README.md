# 128-bit Kogge-Stone parallel prefix adder

A ripple-carry adder makes each carry wait for all the carries below it, so a
128-bit sum takes 128 full-adder delays. A parallel prefix adder computes all
carries at once through a tree of small "carry operators". The tree is
log2(N) levels deep, so 128 bits need 7 levels. The Kogge-Stone arrangement
used here is the fastest of these trees. Each level has at most N operators
and each operator drives only two loads. The price is area and wiring: the
128-bit carry tree holds 769 operators.

This RTL is a purely combinational adder. It computes

    {c[127], s} = a + b + cin

with 128-bit operands. It also exposes the carry out of every bit position.

## The three steps

The adder is built in the three steps that every prefix adder shares.

1. **Propagate / generate** (`ks_pg_gen`). For every bit:
   - `p_i = a_i ^ b_i`: the bit passes an incoming carry on.
   - `g_i = a_i & b_i`: the bit makes a carry of its own.
2. **Carry network** (`ks_carry_network`, built from `ks_prefix_stage` and
   `ks_dot`). It turns the per-bit `(g,p)` pairs into the carries
   `c_i = G[i:0]`. `G[i:0]` is 1 when bits `i..0` together produce a carry.
3. **Sum** (`ks_sum_gen`). `s_i = p_i ^ c_(i-1)` and `s_0 = p_0 ^ cin`.

Steps 1 and 3 are one gate level each. All the design effort is in step 2.

## The carry network

### The dot operator (black node)

`ks_dot` merges the pair of a higher bit group with the pair of the adjacent
lower group:

    g = g_hi | (p_hi & g_lo)
    p = p_hi & p_lo

The joined group makes a carry in two cases:
- the upper half makes one itself, or
- the upper half lets through the carry the lower half makes.

The operator is associative. Groups can therefore be merged in any tree
shape, and that is what gives the carry network its depth of log2(N).

### The buffer (white node)

A white node forwards its `(g,p)` pair unchanged. In this RTL it is a plain
wire inside `ks_prefix_stage`, not a module.

### The stages

Stage `l` (1-based) has distance `D = 2^(l-1)`:

| stage | distance D | dot operators (128 bits) | columns that only forward |
|------:|-----------:|-------------------------:|:--------------------------|
| 1 | 1  | 127 | 0 |
| 2 | 2  | 126 | 0-1 |
| 3 | 4  | 124 | 0-3 |
| 4 | 8  | 120 | 0-7 |
| 5 | 16 | 112 | 0-15 |
| 6 | 32 | 96  | 0-31 |
| 7 | 64 | 64  | 0-63 |

In each stage:
- Column `i >= D` holds a dot operator. It combines column `i` with column
  `i-D` of the previous stage.
- Columns below `D` hold buffers.

After stage `l`, column `i` holds the pair of the bit group
`[i : max(0, i-2^l+1)]`. The group doubles in length at every stage, so after
7 stages every column covers all the bits down to bit 0. Its `g` is then the
carry out of that bit.

Here is the 4-bit case worked by hand for `a = 1001` and `b = 1100`. Pairs
are written as (P,G), bit 3 first:

    p/g step      01  10  00  10
    stage 1       01  00  00  10      (D = 1)
    stage 2       01  00  00  10      (D = 2)
    carries       C3=1 C2=0 C1=0 C0=0
    sum           1_0101

The testbenches check these node values.

### Carry-in

The carry-in enters at bit 0. It is folded into that bit's generate:

    g_0 = a_0 & b_0 | (a_0 ^ b_0) & cin

Every carry from the network therefore already includes `cin`, and the tree
needs no extra column. With `cin = 0` this is the textbook bit-0 generate.

## Interface and timing

`ks_adder128 #(parameter int unsigned WIDTH = 128)`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`   | in  | WIDTH | first addend |
| `b`   | in  | WIDTH | second addend |
| `cin` | in  | 1     | carry into bit 0 |
| `s`   | out | WIDTH | sum |
| `c`   | out | WIDTH | `c[i]` = carry out of bit `i`; `c[WIDTH-1]` is the carry out |

- There is no clock, reset or handshake.
- The outputs follow the inputs after the combinational delay.
- The critical path is one XOR/AND, seven dot operators and one XOR.
- `WIDTH` may be any value of 1 or more. The stage count is
  `$clog2(WIDTH)`, so widths that are not powers of two work too.

Example: `a = b = 2^127` gives `s = 0` and `c = 2^127`. The carry appears
only at the top bit, and the 129-bit result is `2^128`.

## Files

| file | contents |
|------|----------|
| `rtl/ks_pkg.sv` | `gp_t` (packed `{g, p}` pair) and `ks_stages()` |
| `rtl/ks_dot.sv` | dot operator |
| `rtl/ks_pg_gen.sv` | propagate/generate step, carry-in merge |
| `rtl/ks_prefix_stage.sv` | one stage: dot operators at `i >= DIST`, wires below |
| `rtl/ks_carry_network.sv` | `$clog2(WIDTH)` stages in series, carries out |
| `rtl/ks_sum_gen.sv` | sum XOR |
| `rtl/ks_adder128.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench ends with `TB_RESULT checks=N failures=M`. Each one also has a
watchdog that counts a failure if the test hangs.

- `tb_ks_dot`: all 16 input combinations against a truth table.
- `tb_ks_pg_gen`, `tb_ks_sum_gen`: random 128-bit vectors, checked bit by
  bit.
- `tb_ks_prefix_stage`:
  - the two stages of the 4-bit example above, node by node;
  - a 128-column stage at distance 16 with random pairs.
- `tb_ks_carry_network`: the reference walks the pairs serially from bit 0
  (`carry = g_i | p_i & carry`). It checks three widths:
  - 4 bits: the example above;
  - 128 bits: random pairs, plus vectors with long propagate runs;
  - 10 bits: a width that is not a power of two.
- `tb_ks_adder128` runs the top level at its default 128-bit size.
  - The reference is `a + b + cin` in 129-bit arithmetic.
  - The expected carries come from `c_i = ref[i+1] ^ a[i+1] ^ b[i+1]`.
  - It runs about 20,000 vectors: the two examples above, corner values,
    random operands, and operands with long propagate runs.
  - It counts how often a carry-in turns into a carry, how often a carry
    leaves the top bit, and, for each stage `l`, how often a carry travels
    at least `2^(l-1)` bits. Only stage `l` and above can deliver such a
    carry. A mechanism that never happens counts as a failure.

To simulate with Verilator, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
        rtl/ks_pkg.sv tb/tb_ks_adder128.sv --top-module tb_ks_adder128
    ./obj_dir/Vtb_ks_adder128

Swap in any other testbench name to run that test.

## Where this design makes its own choices

- **Carry-in.** The entry point at bit 0 follows the block diagram this
  design is based on. Merging `cin` into `g_0` is this design's choice.
  Hand-expanded sum equations often write the bit-1 carry as `a_0 & b_0`.
  That is correct only for `cin = 0`; this RTL is correct for both values.
- **Carry outputs.** `c` exposes all 128 carries, not only the carry out, and
  `c[127]` is the carry out.
- **No registers.** The adder is a single combinational block. Register its
  inputs and outputs in the surrounding design if it must meet a clock
  period.
- **Fan-out.** Kogge-Stone is sometimes described as having a fan-out of 1.
  As built, each node's output of stage `l` drives two loads in the next
  stage: its own column and the column `2^l` places higher. Near the top of
  the word a node drives only its own column.
- **Not covered.** Power, delay and area numbers depend on the target
  technology. Simulation does not check them.
