# RNS converters on Brent-Kung parallel prefix adders

A residue number system (RNS) represents an integer by its remainders with
respect to a set of co-prime moduli. Arithmetic then runs on each remainder
(residue) independently, with no carries between channels, but numbers must
be converted into the RNS on the way in and back to binary on the way out.
The reverse conversion is the slow, costly step, and it is built from
adders. This design implements both converters for the moduli set
{2^n-1, 2^n, 2^n+1} and builds every adder in them as a Brent-Kung parallel
prefix adder, a prefix structure with low fan-out and logarithmic depth.

The design follows a published description of such a system (block
diagram, adder structure, CRT-with-ROM reverse conversion and an n = 2
simulation in which residues (0, 1, 2) convert to 57). That description
gives the architecture at block level; the exact reduction equations, bit
widths, timing and reset are this design's own choices and are marked as
such below and in the file headers.

## The datapath

```
             +-----------------+  fwd_r1..3   (residue computation,   res_r1..3  +------------------+
 x[3N-1:0] ->| forward         |------------>  application specific, ---------->| reverse converter|-> binary[3N-1:0]
             | converter       |               outside rns_top)                 | (CRT, 1 register)|
             +-----------------+                                                +------------------+
                     \______________ moduli set fixed by parameter N ______________/
```

`rns_top` holds the two converters. The stage between them, which does the
actual arithmetic on residues, depends on the application and is not part
of the RTL: its inputs leave on `fwd_r1..fwd_r3` and its results enter on
`res_r1..res_r3`. Tying `fwd_*` to `res_*` gives a binary -> RNS -> binary
round trip.

| channel | modulus | residue port width |
|---------|---------|--------------------|
| r1      | 2^N - 1 | N                  |
| r2      | 2^N     | N                  |
| r3      | 2^N + 1 | N + 1              |

The dynamic range is M = (2^N-1)·2^N·(2^N+1) = 2^N·(2^(2N)-1), so values
are 3N bits wide. The default is N = 2 (moduli 3, 4, 5, M = 60), the size
of the reference simulation. N may be set from 2 to 15.

Timing: `x` to `fwd_*` is combinational. `res_*` to `binary` takes one
clock: the reverse converter's result is registered on the rising edge of
`clk`. `rst` is active high and asynchronous and clears `binary` to 0.
Four flags (`fwd_r1_wrap`, `fwd_r3_sub`, `rev_fold_wrap`, `rev_zero_fix`)
report which correction steps the converters took for the current inputs.
They exist for observation and testing only.

## The Brent-Kung adder

`bk_adder` has the three stages of any parallel prefix adder:

1. **Pre-processing** (`bk_pre`): bit generate g_i = a_i·b_i and bit
   propagate p_i = a_i ⊕ b_i.
2. **Prefix carry tree** (`bk_tree`): combines (g, p) pairs of adjacent
   groups with the prefix operator (G, P) = (G_hi + P_hi·G_lo, P_hi·P_lo)
   until every bit position knows the generate of the group from itself
   down to bit 0, which is the carry into the next bit.
3. **Post-processing** (`bk_post`): s_i = p_i ⊕ c_i.

The carry in enters the tree as an extra position 0 with generate = cin and
propagate = 0. The operand bits sit at positions 1..W, and the tree spans
W+1 positions. Three kinds of cell appear in the tree:

- a **black cell** (`bk_black_cell`) forms both G and P. It is used where
  the merged group does not yet reach position 0.
- a **grey cell** (`bk_grey_cell`) forms only G. It is used where the lower
  group already reaches position 0. The P of such a group is 0 because
  position 0 has P = 0, so it is never needed.
- a **buffer cell** passes a position on unchanged. In RTL it is a wire.

The tree is generated for any W. It has an up-sweep of L = ⌈log2(W+1)⌉
levels that merges at strides 2, 4, 8, ..., then a down-sweep of L-1
levels that fills in the prefixes still missing. For four positions it is
the textbook 4-bit Brent-Kung tree:

```
position    3        2        1        0
level 1   black    buffer   grey     buffer     (3:2), (1:0)
level 2   grey     buffer   buffer   buffer     (3:0) = (3:2)∘(1:0)
level 3   buffer   grey     buffer   buffer     (2:0) = (2)∘(1:0)
```

No cell drives more than two others. The depth is 2L-1 cells.

Two small helpers are built on `bk_adder`:

- `rns_eac_adder` adds modulo 2^W-1 with an end-around carry (EAC). Since
  2^W ≡ 1, a carry out of the top bit is worth 1 and must go back into the
  carry in. Feeding cout straight back to cin would close a combinational
  loop. The module therefore uses two adders: the first finds the carry
  out, the second adds the operands again with that carry as its carry in.
  Zero can come out as all zeros or as all ones. Users map all ones to
  zero where the canonical code is needed.
- `rns_cond_sub` computes y = x ≥ MOD ? x - MOD : x. The difference is
  x + ~MOD + 1, and the adder's carry out is the comparison.

## Forward conversion (`rns_forward_converter`)

x is split into three N-bit digits, x = x2·2^(2N) + x1·2^N + x0. No divider
is needed:

- **mod 2^N**: the low digit x0.
- **mod 2^N-1**: since 2^N ≡ 1, x ≡ x0 + x1 + x2. Two EAC adders sum the
  digits, and an all-ones result becomes 0.
- **mod 2^N+1**: since 2^N ≡ -1, x ≡ x0 - x1 + x2. The circuit forms
  x0 + x2 and adds (2^N+1) - x1 (computed as M3 + ~x1 + 1) so the value
  stays positive. The result is below 3·(2^N+1), so two conditional
  subtractions of 2^N+1 bring it into range.

Any 3N-bit input is accepted. Inputs at or above M give the residues of x,
which stand for x mod M.

## Reverse conversion (`rns_reverse_converter`)

This is the hardest part of the design. By the Chinese remainder theorem,

    X = | r1·C1 + r2·C2 + r3·C3 |_M ,   C_i = M_i · |M_i^-1|_{m_i},  M_i = M / m_i

**Constants in ROM.** The three C_i depend only on N. `rns_crt_rom` holds
them as a small ROM whose contents are computed at elaboration by the
functions in `rns_pkg` (extended Euclid for the inverses). In closed form
they are C1 = 2^N(2^N+1)·2^(N-1), C2 = (2^(2N)-1)(2^N-1) and
C3 = 2^N(2^N-1)(2^(N-1)+1). For N = 2 these are 40, 45 and 36.

**Products and sum.** Each residue is multiplied by its constant (`out1`,
`out2`, `out3`). A Brent-Kung adder adds the first two (`mid`), and a
second one adds the third (`sum`). The sum width is taken from the largest
sum that the port widths allow (9 bits at N = 2). Non-canonical residues,
such as r1 = 2^N-1 (which means 0) or r3 > 2^N, still give the correct
result.

**Reduction modulo M without a divider.** The circuit uses
M = 2^N · Q with Q = 2^(2N)-1:

    |sum|_M = 2^N · | sum >> N |_Q  +  (sum mod 2^N)

The low N bits of the sum pass straight through. The upper part is cut
into 2N-bit digits. Since 2^(2N) ≡ 1 (mod Q), these digits are simply
added with EAC adders (one addition at N = 2). An all-ones result, the
second code for zero, is mapped to 0. The concatenation
{|sum>>N|_Q, sum[N-1:0]} is then already below M, so no final comparison
is needed.

**Worked example, N = 2**, residues (r1, r2, r3) = (0, 1, 2):
out1 = 0·40 = 0, out2 = 1·45 = 45, out3 = 2·36 = 72, mid = 45, sum = 117.
The upper part is 117 >> 2 = 29 = 0b0001_1101. The EAC addition 13 + 1 = 14
gives 14 mod 15. The low bits are 117 mod 4 = 1. X = 14·4 + 1 = 57, and
indeed 57 mod (3, 4, 5) = (0, 1, 2).

## Sizes

| N | moduli       | M           | x / binary | sum bits | 2N-bit fold digits |
|---|--------------|-------------|------------|----------|--------------------|
| 2 | 3, 4, 5      | 60          | 6          | 9        | 2                  |
| 4 | 15, 16, 17   | 4 080       | 12         | 18       | 2                  |
| 8 | 255, 256, 257| 16 776 960  | 24         | 34       | 2                  |

At N = 2 the whole top synthesizes to about 140 word-level cells and 6
flip-flops.

## What is this design's own

The following points are not given by the source description and were
chosen here:

- Bit widths: residues use the minimum N / N / N+1 bits and values 3N bits.
  The reference waveform shows 4-bit residues and 8-bit products at N = 2.
- The forward converter's digit-folding circuit. The source only says that
  the remainders of division by each modulus are taken.
- The modulo-M reduction by 2^N·(2^(2N)-1) splitting and EAC folding. The
  source names carry-propagate, carry-save and EAC adders for "the final
  equations" without giving them. No carry-save adders are used here.
- The two-adder form of the EAC adder.
- The products are written with `*`. The source does not say how the
  multipliers are built.
- The single output register, the asynchronous active-high reset and the
  combinational forward converter.
- The correction-step flag outputs.

Not built: the residue computation stage. Its operations are not specified,
so it is left to the user at the `fwd_*` / `res_*` ports. The source
compares the Brent-Kung adder with ripple-carry, carry-lookahead,
carry-select and Kogge-Stone adders on an FPGA. Those adders are baselines
and are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog if
it hangs. Expected values come from integer arithmetic, not from the
circuit's own method:

| testbench                  | what it covers |
|----------------------------|----------------|
| `bk_black_cell_tb`, `bk_grey_cell_tb`, `bk_pre_tb`, `bk_post_tb` | exhaustive truth tables |
| `bk_tree_tb`               | every carry vs. integer sums; W = 4 exhaustive, W = 5, 13, 32 random, and all-propagate chains |
| `bk_adder_tb`              | W = 4 and 8 exhaustive (with cin), W = 32 random |
| `rns_eac_adder_tb`, `rns_cond_sub_tb` | exhaustive at two widths |
| `rns_crt_rom_tb`           | hand-computed constants for N = 2, 3; CRT property for N = 5 |
| `rns_forward_converter_tb` | N = 2, 4 exhaustive, N = 8 random; all correction paths hit |
| `rns_reverse_converter_tb` | N = 2 over all port values, N = 4 all canonical triples, N = 6 random, against a table built from x -> residues. Also checks one-cycle latency, async reset and the N = 2 example with its internal products |
| `rns_top_tb`               | default size, every input x through four per-channel operations (identity, square, add k, multiply by k) against integer arithmetic mod M; counts every correction step and both resets and fails if one never occurred |

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb --top-module rns_top_tb \
    rtl/rns_pkg.sv tb/rns_top_tb.sv
./obj_dir/Vrns_top_tb
```

Verilator finds the other modules by name through `-Irtl`. The package
`rns_pkg.sv` must come first on the command line. Every testbench finishes
in well under a second.

## Files

- `rtl/rns_pkg.sv`: moduli, dynamic range, CRT constants and width
  functions (elaboration time only).
- `rtl/rns_top.sv`: top level, with both converters.
- `rtl/rns_forward_converter.sv`, `rtl/rns_reverse_converter.sv`,
  `rtl/rns_crt_rom.sv`: the converters and the constant ROM.
- `rtl/rns_eac_adder.sv`, `rtl/rns_cond_sub.sv`: modular adder helpers.
- `rtl/bk_adder.sv`, `rtl/bk_pre.sv`, `rtl/bk_tree.sv`, `rtl/bk_post.sv`,
  `rtl/bk_black_cell.sv`, `rtl/bk_grey_cell.sv`: the Brent-Kung adder.
- `tb/*_tb.sv`: one testbench per module.
