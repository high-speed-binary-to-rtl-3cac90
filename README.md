# Binary-to-residue converter with 2-bit input segmentation

This converter turns an unsigned binary word `A` into its residue number system
(RNS) representation `(|A|_m1, |A|_m2, ...)`. The moduli are small, five-bit
numbers. A residue processor can only start work once its input has been
converted. A converter built from large look-up memories caps the clock rate
at the memory access time.

This design avoids memories in the input layer. The word is cut into 2-bit
segments. The residue of a 2-bit segment can take only four values, so each of
its output bits is a logic function of two variables, at most one gate. The
segment residues are then summed modulo `m` by a carry-save tree, a small
table and one conditional subtraction of `m`. Every stage is a short chain of
full adders, so the datapath can be cut into short pipeline stages. Each
modulus has its own channel, and all channels run in parallel.

## Worked example

Take `A = 3545 = 1101_1101_1001b` and `m = 29`:

| segment   | bits    | value          | residue mod 29 |
|-----------|---------|----------------|----------------|
| first     | `3:0`   | `1001` = 9     | 9 (passed on unchanged, since 9 < 29) |
| LF1       | `5:4`   | `01` x 2^4     | 16 |
| LF2       | `7:6`   | `11` x 2^6     | 6 + 12 = 18 |
| LF3       | `9:8`   | `01` x 2^8     | 24 |
| LF4       | `11:10` | `11` x 2^10    | 9 + 18 = 27 |

9 + 16 + 18 + 24 + 27 = 94, and 94 mod 29 = 7 = 3545 mod 29. The testbenches
run this example first.

## One channel, stage by stage (`b2r_channel`)

```
 a[P-1:0]
   |  first segment (ceil(log2 m)-1 bits)     2-bit segments
   v                                   v   v   v   v
 [pass] ----------------------------  [LF1][LF2][LF3][LF4]      smg_layer / smg2
   \_________________ NSEG+1 residues ________________/
                          |
                    [ CSA tree ]                                 csa_tree
                     c |     | s
        split at bit K: c = (c_H, c_L),  s = (s_H, s_L)
            c_H, s_H |            | c_L, s_L
                  [ BA1 ]         |                              rca
                  h = C_H + S_H   |
                  [ LT  ]         |   |h * 2^K|_m                mod_lut
                       \          |
                   [ CSA1 ]  X = X1 + X2 = LT + C_L + S_L  (< 2m)     fmg
                    |    \
                    |   [ CSA2 ]  X1 + X2 - m
                 [ BA2 ]   [ BA3 ]
                  X         X - m  (sign bit)
                    \       /
                    [  MUX  ]  ->  |A|_m
```

### Segment generators (`smg_layer`, `smg2`)

Let `b = ceil(log2 m)`. The lowest `b-1` bits form a number below `m`, so they
need no reduction. The remaining bits are taken two at a time. Segment `g`
covers bits `q0+2g+1 .. q0+2g`, where `q0 = b-1`. Its generator returns one of
0, `|2^i|_m`, `|2^(i+1)|_m` and `|2^i + 2^(i+1)|_m`. Those four constants are
computed at elaboration time from `m` and `i` (package `b2r_pkg`). Synthesis
reduces every output bit to one of `0, b1&b0, b1&~b0, b1, ~b1&b0, b0, b1^b0,
b1|b0`. If `P - q0` is odd, the last segment is one bit wide; it is padded with
a zero. For `m = 29` the four generators of a 12-bit word produce
{0, 16, 3, 19}, {0, 6, 12, 18}, {0, 24, 19, 14} and {0, 9, 18, 27}.

### Carry-save tree (`csa_tree`)

Many generator output bits are constant 0. For example, segment `5:4` gives
only 0, 16, 3 and 19 for `m = 29`, so its bits 2 and 3 never change. The tree
takes only the bits that can be 1 (the `LIVE` mask, derived from the segment
residues) and sorts them by weight into columns. For `p = 12`, `m = 29` the
columns for weights 2^0 .. 2^4 hold 4, 5, 3, 4 and 4 bits.

At each level, a column is taken three bits at a time by full adders. The sum
bit stays in the column and the carry moves to the next column up. One or two
left-over bits pass on unchanged. When no column holds more than two bits, bit
0 of every column forms the vector `s` and bit 1 forms `c`. The m = 29 tree
takes three levels.

The tree width `TW` is the width of the largest possible sum. For `p = 12`,
`m = 29` the largest sum is 15+19+18+24+27 = 103, so `TW = 7`. Every partial
sum is below `2^TW`, so the carries out of the top column are always zero and
can be dropped.

### The split, BA1 and the table: why one subtraction is enough

This is the key step. `C + S` may be several times `m`. Finishing the
reduction with a carry-propagate adder followed by a table would put the table
on the critical path and make it large. Instead, both vectors are cut at bit
`K`:

* The low parts `c_L = c[K-1:0]` and `s_L = s[K-1:0]` are kept as they are.
  `K` is the largest value for which their sum is always below `m`. That
  sum is at most `2 * (2^K - 1)`, so the rule is `2^(K+1) - 2 < m`. This
  gives `K = 3` for every modulus from 15 to 30, and `K = 4` for 31.
* The high parts have weight `2^K`. BA1, a short ripple-carry adder, forms
  `h = C_H + S_H`. Because `h * 2^K <= 103`, `h <= 12` fits in 4 bits.
  A 16-entry table (LT) returns `|h * 2^K|_m`, which is below `m`.

Therefore `X = LT + C_L + S_L < 2m`, and `|A|_m` is either `X` or `X - m`.
The final modulo generator (`fmg`) computes both in parallel:

* CSA1 adds LT, `c_L` and `s_L` into two vectors, `X1` and `X2`.
* CSA2 adds `X1`, `X2` and the constant `-m`, as a `(b+1)`-bit two's
  complement number (35 for `m = 29`).
* BA3, a `(b+1)`-bit ripple-carry adder, resolves `X - m`. BA2, a `b`-bit
  adder, resolves `X`. BA2 needs no extra bit, because its result is only
  used when `X < m`.
* The MUX takes `X - m` when its sign bit is 0, and `X` otherwise.

The port `sel_sub` reports which of the two was taken.

All widths come from `P` and `m`, so any `P > b-1` and any modulus `m >= 3`
elaborate. For `P = 12`, `m = 29` they come out as:

| quantity                        | value            |
|---------------------------------|------------------|
| first segment, 2-bit segments   | 4 bits, 4        |
| tree operands / levels / width  | 5 / 3 / 7 bits   |
| split `K`, `c_L` and `s_L` width | 3                |
| BA1, LT                         | 4-bit adder, 16 x 5-bit table |
| CSA1, CSA2, BA3                 | 6 bits           |
| BA2, MUX, result                | 5 bits           |

## Pipeline and timing

The parameter `PIPE` (4 bits) controls four optional register cuts:

| bit | register after   | stage contents (delay in full-adder delays t_FA) |
|-----|------------------|-----------------------------------------|
| 0   | CSA tree         | generators + 3-level tree (about 3.6)  |
| 1   | BA1              | BA1 (about 3.1)                         |
| 2   | CSA2 (in `fmg`)  | LT + CSA1 + CSA2 (about 3.3)            |
| 3   | MUX (in `fmg`)   | BA2/BA3 + MUX (about 4.3)               |

With a full-adder delay of about 0.27 ns, the longest stage is about 1.2 ns.
The latency is the number of set bits: 4 cycles by default. Every
configuration accepts one word per clock. `PIPE = 0` gives a purely
combinational channel with latency 0. These cut points are a choice of this
implementation; the architecture allows registers as fine as every full-adder
layer.

`in_valid` travels down a shift register of the same depth and appears as
`out_valid`. `rst_n` is asynchronous and active low, and clears only that
shift register. Data registers have no reset.

## The converter (`b2r_converter`)

Inputs are unsigned integers in `[0, 2^P - 1]`; a signed input must be
mapped into the RNS range before conversion.

The top module instantiates one channel per modulus in `MODULI` and feeds all
of them the same word. All channels have the same pipeline depth, so their
residues come out in the same cycle, under one `out_valid`. Each residue is
`max ceil(log2 m)` bits wide, and narrower ones are zero-extended. An assertion
checks that the channels' valid bits agree.

The default base `{29, 31, 17}` is this implementation's choice. The original
architecture names only the example modulus 29 and the class of five-bit
moduli. These three are pairwise prime, and their product, 15283, exceeds
2^12, so every 12-bit input has a unique representation. The moduli must be
pairwise prime for the residues to form an RNS; nothing checks this.

## Departures from the original architecture

* **Tree organisation.** The tree is built per bit column from the live
  generator bits, as in the original. The full adders are grouped level by
  level in Wallace fashion, with no half adders. The original arrangement
  places some half adders and feeds carries differently. The tree depth is
  the same, three full-adder levels for `p = 12`, `m = 29`. The original
  per-weight bit counts give 5 bits of weight 2^4 where the residues above
  give 4.
* **Table address.** The table is addressed by the sum `C_H + S_H` from BA1,
  as in the channel block diagram and its cost breakdown. An alternative
  addresses it with the concatenation `(c_H, s_H)` and no adder.
* **Bus widths.** Every generator output is `b` bits wide. Some of the original
  diagram's narrower buses cannot carry the residues they would need (for
  example 18 for segment `7:6`). `c_L` and `s_L` are both `K = 3` bits wide;
  a 4-bit `c_L` would let `C_L + S_L` reach 29.
* **Pipeline cuts, valid/reset handshake and moduli set** are this
  implementation's choices (see above).

## Files

| file | contents |
|------|----------|
| `rtl/b2r_pkg.sv` | elaboration-time functions: `|2^i|_m`, segment residues, segment count, tree width, split point, table width |
| `rtl/smg2.sv`, `rtl/smg_layer.sv` | 2-bit segment generator, segmentation layer |
| `rtl/csa.sv`, `rtl/csa_tree.sv` | word-level 3:2 carry-save adder (used in `fmg`), column-compressing carry-save tree |
| `rtl/rca.sv` | ripple-carry adder (half adder + full adders) |
| `rtl/mod_lut.sv` | table `|h * 2^K|_m` |
| `rtl/fmg.sv` | CSA1, CSA2, BA2, BA3, MUX |
| `rtl/pipe_reg.sv` | optional pipeline register |
| `rtl/b2r_channel.sv` | one channel |
| `rtl/b2r_converter.sv` | top: parallel channels |

## Verification

Every testbench checks against integer `%` arithmetic, works out its expected
values itself, and ends with a `TB_RESULT checks=N failures=M` line.

* `tb_smg2`: all segment values at bits 4..11 for m = 17, 29 and 31, plus the
  literal residues 0, 16, 3, 19 for m = 29 at bit 4.
* `tb_smg_layer`: the worked example, random 12-bit words, and a 13-bit word
  whose last segment is one bit wide.
* `tb_csa`, `tb_csa_tree`, `tb_rca`, `tb_mod_lut`: arithmetic identities.
  The trees tested have 2, 3, 5 and 15 operands, plus the masked m = 29 tree
  and its depth of three levels.
* `tb_fmg`: every `(LT, c_L, s_L)` combination, streamed one per clock,
  checked at a latency of exactly 2 cycles. Both multiplexer choices must
  occur.
* `tb_b2r_channel`: three channel configurations (m = 29 with latency 4,
  m = 17 with 13 bits and no registers, m = 31 with 2 registers). Every input
  is applied, with random idle cycles. Each output and each `out_valid` is
  checked at its exact latency.
* `tb_b2r_converter`: the top at default parameters. All 4096 inputs are
  applied with idle and back-to-back cycles. Each residue is checked, the
  residue triple is mapped back by the Chinese remainder theorem, and both
  multiplexer choices must occur in every channel.
* `tb_word_lengths`: the m = 29 channel at p = 12, 14, 16, 24 and 32, with
  20000 random words each.

To simulate, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl rtl/b2r_pkg.sv tb/tb_b2r_converter.sv \
          --top-module tb_b2r_converter
./obj_dir/Vtb_b2r_converter
```

Substitute any other testbench name. To change the design, set `P`, `MODULI`
and `PIPE` on `b2r_converter`, or `P`, `M` and `PIPE` on `b2r_channel`. All
internal widths follow from them.
