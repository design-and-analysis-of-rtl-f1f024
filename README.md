# Radix-8 Booth pipelined 32 × 32 multiplier

This is a three-stage pipelined multiplier for two 32-bit operands that gives
a 64-bit product. It cuts the number of partial products by recoding the
multiplier in radix 8. A plain shift-and-add multiplier makes 32 partial
products. Radix-4 (modified) Booth recoding makes 16. Radix-8 Booth
recoding makes only 11. Each of these partial product rows is 35 bits wide.
The rows are summed by ten carry look-ahead adders (CLAs). They are arranged
either as a tree (the default) or as a simple chain. A register after each
step makes the pipeline. The multiplier accepts a new operand pair on every
clock and returns each product three clock edges later.

The design follows a published radix-8 pipelined multiplier for FPGAs. The
section "Choices and departures" lists where this RTL fills gaps or differs.

## Datapath and timing

```
 multiplicand, multiplier, in_valid
        │
  ┌─────▼──────┐  stage 1: operand_reg (64 flip-flops + valid)
  └─────┬──────┘
  booth8_ppr_gen   multiples ±X, ±2X, ±3X, ±4X; 11 × 16:1 muxes (booth8_ppr_mux)
        │
  ┌─────▼──────┐  stage 2: ppr_reg (11 × 35 = 385 flip-flops + valid)
  └─────┬──────┘
  ppr_tree_adder   (TREE = 1)   or   ppr_seq_adder (TREE = 0)   ten CLAs (cla_adder)
        │
  ┌─────▼──────┐  stage 3: product_reg (64 flip-flops + valid)
  └─────┬──────┘
   product, out_valid
```

Suppose the operands are present with `in_valid = 1` before rising edge *t*.
Then `product` holds their product, with `out_valid = 1`, right after edge
*t + 2*. That is the third edge that samples them, so the latency is three
cycles. The throughput is one product per cycle. Nothing ever stalls and there
is no feedback path. `rst` is synchronous and active high. It clears every
register, so operations in flight are dropped.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous reset, active high |
| `in_valid` | in | 1 | operands valid this cycle |
| `multiplicand` | in | N | X |
| `multiplier` | in | N | Y (the operand that is Booth-recoded) |
| `out_valid` | out | 1 | `product` is a result |
| `product` | out | 2N | X × Y |

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 32 | operand width. Gives R = ⌈(N+1)/3⌉ rows of N+3 bits. |
| `SIGNED` | 1 | 1: two's-complement operands. 0: unsigned. |
| `TREE` | 1 | 1: tree of CLAs. 0: chain of CLAs. |

## Radix-8 Booth recoding

A 0 is appended below the multiplier's LSB. One extension bit is added above
its MSB: a copy of the sign bit, or 0 when unsigned. The result is cut into
overlapping 4-bit groups that step by 3 bits. Group *k* is
`{y[3k+2], y[3k+1], y[3k], y[3k-1]}`. Each group becomes one signed digit,
*d_k = −4·y[3k+2] + 2·y[3k+1] + y[3k] + y[3k−1]*, in the range −4…+4. Then

    X · Y = Σ_k  d_k · X · 2^(3k),   k = 0 … 10 for N = 32

The top group is `{y32, y31, y30, y29}`. So 11 groups cover 32-bit
multipliers, signed or unsigned.

A 16:1 multiplexer for each row (`booth8_ppr_mux`) turns the group's code
straight into a row:

| code | row | code | row | code | row | code | row |
|---|---|---|---|---|---|---|---|
| 0000 | 0 | 0100 | +2X | 1000 | −4X | 1100 | −2X |
| 0001 | +X | 0101 | +3X | 1001 | −3X | 1101 | −X |
| 0010 | +X | 0110 | +3X | 1010 | −3X | 1110 | −X |
| 0011 | +2X | 0111 | +4X | 1011 | −2X | 1111 | 0 |

`booth8_ppr_gen` builds the eight nonzero multiples once. All 11
multiplexers share them:

- X is extended to 35 bits (N + 3).
- 2X and 4X are shifts of X.
- 3X is the one "hard" multiple. A 35-bit CLA forms it as X + 2X.
- Each negative multiple is a full two's complement, ~kX + 1. A CLA with
  carry-in 1 forms it.

So each row is the exact signed value d_k·X in 35 bits. No correction bits
are needed later. 35 bits is enough for ±4X of either a signed or an unsigned
32-bit X. Example: take X = Y = 12. Then row 0 is code `1000` = −4X = −48,
and row 1 is code `0011` = +2X = +24. The sum is −48 + 24·8 = 144.

## Adding the rows

The rows are weighted by 8^k. Before addition, row *k* is sign-extended and
shifted 3k bits left into the 64-bit product frame. Both adder structures use
ten CLAs, because eleven operands always need ten two-input adders.

**Tree (`ppr_tree_adder`, default).** The first level adds five pairs:
r0+r1, r2+r3, r4+r5, r6+r7 and r8+r9. The odd row, r10, is added to the last
pair's sum. This leaves five partial sums. The next level pairs them the same
way. At each level, a leftover is again added to the last pair's sum:

```
level 1: A=r0+r1  B=r2+r3  C=r4+r5  D=r6+r7  E=r8+r9  E'=E+r10
level 2: F=A+B    G=C+D    G'=G+E'
level 3: product = F+G'
```

The longest path has four adders; the chain has ten. Each adder is only as
wide as its operands need. The upper operand starts 3·(first row) bits up, so
the lower operand's bits below that point go straight to the result. The top
bit is where the covered rows' sum can reach, plus one bit for the carry,
capped at bit 63. Above the adder, its result is sign-extended. For N = 32:

| sum | rows | CLA bits | width |
|---|---|---|---|
| A…E | pairs | [38:3] … [62:27] | 36 |
| E' | 8–10 | [63:30] | 34 |
| F | 0–3 | [44:6] | 39 |
| G | 4–7 | [56:18] | 39 |
| G' | 4–10 | [63:24] | 40 |
| product | 0–10 | [63:12] | 52 |

The plan is worked out at elaboration by `radix8_pkg::tree_plan`, so the
module is correct for other `N`.

**Chain (`ppr_seq_adder`, `TREE = 0`).** Row 0 starts a running sum. Each
further row is added to it by its own 64-bit CLA. All ten adders are the same
size, and each waits for the one before. This is simpler to lay out but
slower.

All arithmetic is modulo 2^64. The true product always fits in 64 bits, so
bits that fall off the top never matter.

## Carry look-ahead adder

`cla_adder` works in 4-bit groups. Inside a group, each carry is one AND-OR
expression of the bit generate (a·b) terms, the propagate (a⊕b) terms and the
group's carry-in. Each group also gives a group generate G and propagate P.
The carry between groups is c(g+1) = G(g) + P(g)·c(g). Widths that are not a
multiple of 4 are padded internally.

## Choices and departures

These choices are this design's own. The source says nothing on them or is
unclear:

- **Valid flag and reset.** A valid bit runs through the three registers, and
  reset is synchronous. The source names a reset input but gives no handshake.
- **Signed operands by default.** `SIGNED = 0` gives unsigned operands. The
  row width and the 11th group cover both cases.
- **Row width of 35 bits.** One passage says the rows are two bits longer
  than the multiplicand (34); another gives 35. This design uses 35.
- **Rows are sign-extended before adding.** A published simulation shows
  2^35 + 144 for 12 × 12. That is what summing 35-bit rows without sign
  extension gives. This design gives the exact product, 144.
- **Product of 64 bits.** A published waveform shows a 65-bit output.
- **How 3X is made.** It is made with a CLA, and negatives with CLA
  increments. The source gives only "complement and shift".
- **Tree wiring.** The source fixes the first level (five pairs, with the odd
  row added to one of their sums) and the total of ten adders. The wiring
  above the first level and the exact adder widths are this design's.
- **Chain adder width.** The source says only that all adders in the chain
  have the same size. This design uses 64 bits.
- **CLA inside.** The 4-bit grouping is this design's.

Not included:

- The radix-4 multipliers that the source compares against.
- The FPGA debug cores used to check the design on a board.
- The source's delay and power figures. They are measurements of an FPGA
  implementation and say nothing about this RTL.

## Size

A generic coarse synthesis gives these sizes. They are word-level cells, not
FPGA LUTs. The default top has 515 flip-flops: 64 + 385 + 64 data bits and
three valid bits. The tree adder is about 1.9k cells. The chain adder is about
3.2k cells, because all its ten adders are 64 bits wide.

## Files

`rtl/` holds one module or package per file:

- `radix8_pkg.sv`: row count, row width, Booth digit, tree plan
- `cla_adder.sv`
- `booth8_ppr_mux.sv`, `booth8_ppr_gen.sv`
- `operand_reg.sv`, `ppr_reg.sv`, `product_reg.sv`
- `ppr_tree_adder.sv`, `ppr_seq_adder.sv`
- `radix8_pipelined_mult.sv` (top)

`tb/` has a self-checking testbench for each module. Each compares against
expected values worked out with the simulator's own integer arithmetic. Each
ends by printing `TB_RESULT checks=… failures=…` and has a watchdog.

- `tb_radix8_pipelined_mult` runs the default, unsigned and chained
  configurations side by side. It streams corner cases and random operands at
  full rate, with idle cycles, and resets in mid-stream. It checks the
  three-cycle latency. It also confirms that all 16 Booth codes, full-rate
  runs, bubbles, a reset flush and negative products each occurred.
- `tb_radix8_full` runs the top with all defaults. It does 0x80000000 ×
  0x80000000 = 2^62, checks the latency, then runs 20,000 random products
  back to back.

To simulate with Verilator 5, for example:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/radix8_pkg.sv tb/tb_radix8_full.sv --top-module tb_radix8_full
./obj_dir/Vtb_radix8_full
```

Use the same command for any other testbench; only the testbench name
changes. Each one takes well under a second.
