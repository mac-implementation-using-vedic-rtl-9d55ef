# Multiply-accumulate unit with an Urdhva Tiryagbhyam multiplier

A multiply-accumulate (MAC) unit adds the product of two operands to a running
sum on every clock: `Q <= Q + A*B`, so that after n enabled clocks
`Q = A1*B1 + A2*B2 + ... + An*Bn`. This design builds the multiplier with the
Urdhva Tiryagbhyam ("vertically and crosswise") method of Vedic arithmetic and
uses carry-save addition, in which carries travel between bit positions only
once per addition, both in the accumulator's adder and inside the multiplier.

The default unit takes two 16-bit unsigned operands and keeps a 32-bit sum.
One product is accepted per clock, and the path from the operands to the
register is fully combinational.

```
   a[N-1:0]      b[N-1:0]
       |             |
   +---v-------------v---+
   |  vedic_mul  N x N   |        p = a * b  (2N bits)
   +----------+----------+
              | p
        +-----v------+
   +--->| csa_adder  |  x = p, y = q, z = 0
   |    +-----+------+
   |          | sum             overflow check on bit 2N-1 of p, q, sum
   |    +-----v------+
   |    |  acc_reg   |  clk, rst, ce
   |    +-----+------+
   |          |
   +----------+----> q[2N-1:0]          ovf (sticky)
```

## Files

| file | module | role |
|---|---|---|
| `rtl/mac_unit.sv` | `mac_unit` | top: multiplier, adder, accumulator register, overflow flag |
| `rtl/vedic_mul.sv` | `vedic_mul` | N x N Urdhva Tiryagbhyam multiplier, combinational |
| `rtl/vedic_2x2.sv` | `vedic_2x2` | 2 x 2 base cell of the multiplier |
| `rtl/csa_adder.sv` | `csa_adder` | three-operand carry-save adder |
| `rtl/acc_reg.sv` | `acc_reg` | register with synchronous reset and clock enable |
| `tb/tb_*.sv` | | self-checking testbenches, one per module, plus `tb_mac_configs` |

## The multiplier

Urdhva Tiryagbhyam computes a product column by column: each column adds the
"vertical" digit products (same position in both operands) and the
"crosswise" ones (digits from opposite sides). `vedic_mul` applies the rule
hierarchically on binary digits of growing size.

**Level 1.** Both operands are cut into 2-bit digits. Every digit pair
`a_i x b_j` goes to a `vedic_2x2` cell: bit 0 is the vertical product
`a0 b0`, bit 1 the crosswise sum `a1 b0 + a0 b1` (a half adder), and bits 3:2
the vertical product `a1 b1` plus the crosswise carry (a second half adder).

**Higher levels.** Each level doubles the digit size S. With
`a = {aH, aL}` and `b = {bH, bL}`, halves of H = S/2 bits, the four products
of the level below are

| product | kind | weight |
|---|---|---|
| `aL*bL` | vertical | 2^0 |
| `aH*bL` | crosswise | 2^H |
| `aL*bH` | crosswise | 2^H |
| `aH*bH` | vertical | 2^S |

The low H bits of `aL*bL` are final. Everything else is three operands of
3H bits each, all with weight 2^H:

```
   x = {0, aH*bL}
   y = {0, aL*bH}
   z = {aH*bH, aL*bL[S-1:H]}
```

One `csa_adder` of width 3H adds them, and the result is
`{x + y + z, aL*bL[H-1:0]}`. Because the full product fits in 2S bits,
`x + y + z` always fits in 3H bits; the adder's carry-out is asserted to be
zero in simulation. After log2(N) levels a single N x N product remains.
For N = 16 that is 64 base cells and 16 + 4 + 1 = 21 carry-save adders of
widths 6, 12 and 24.

The multiplier is written as nested `generate` loops over levels and digit
pairs, not as a module that instantiates itself. Each level reads the
product array of the level below by hierarchical name
(`g_lvl[l-1].prod[i][j]`). `N` must be a power of two, at least 2.

## The carry-save adder

`csa_adder` adds three W-bit operands in two steps. A row of full adders
turns `x, y, z` into a partial-sum vector `x ^ y ^ z` and a carry vector
(majority of the three bits). No carry crosses a bit position in this step.
A single carry-propagate addition `sum + (carry << 1)` then gives the W+2-bit
result, split into `sum[W-1:0]` and `cout[1:0]`. That addition is written as
`+`, so synthesis chooses the adder structure.

In the MAC the accumulator's adder has only two operands, the product and
the fed-back register value, so its third input is tied to zero. Inside the
multiplier all three inputs are used.

## Accumulation, control and overflow

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous reset, active high: clears `q` and `ovf` |
| `ce` | in | 1 | clock enable: high accumulates on this edge, low holds |
| `a`, `b` | in | N | unsigned operands |
| `q` | out | 2N | accumulated sum, wraps modulo 2^(2N) |
| `ovf` | out | 1 | sticky overflow flag |

Reset has priority over `ce`. `q` shows the sum including `a*b` right after
the edge that sampled `a` and `b`, so latency is one clock and throughput one
product per clock.

**Overflow.** The flag uses the rule for a signed adder: the two addends
(product and accumulator) have the same most significant bit, and the sum's
most significant bit differs from it. When that happens on an accumulating
edge, `ovf` goes high and stays high until reset. It is sticky because once
the sum has wrapped, every later value of `q` is wrong too. The operands are
unsigned, so read the flag with care:

* it fires when the accumulator crosses 2^(2N-1), before any real unsigned
  wrap;
* it misses some unsigned wraps. For example, if the product has its top
  bit set and the accumulator does not, the sum may wrap past 2^(2N)
  without the flag.

Applications that need exact unsigned-overflow detection should use the
adder's `cout`, which `mac_unit` leaves unconnected.

## Sizes

`mac_unit` has one parameter, `N` (default 16): operands of N bits and an
accumulator of 2N bits. Three sizes are tested:

| N | operands | q | where tested |
|---|---|---|---|
| 8 | 8 bit | 16 bit | `tb_mac_configs` |
| 16 (default) | 16 bit | 32 bit | `tb_mac_unit` |
| 32 | 32 bit | 64 bit | `tb_mac_configs` |

The reference point for the 8-bit size is a trace in which `a = b = 0, 1, 2,
3, 4` on successive clocks gives `q = 0, 1, 5, 14, 30`. Both `tb_mac_unit`
and `tb_mac_configs` check this sequence.

Synthesized with a generic gate library (Yosys, coarse), the default unit
comes to about 690 word-level cells (an adder counts as one cell) and 33
flip-flops: 32 for `q` and one for `ovf`. No timing figure is given here. The critical path runs from `a`,
`b` through four multiplier levels and the accumulator adder into `q`.

## Choices made in this design

The overall structure is as published for this unit: a 16 x 16 Vedic
multiplier, a 32-bit carry-save adder and a 32-bit register fed back into
the adder. So are the operand and result widths, the signal names
`clk, rst, ce, a, b, q`, and the signed-adder overflow rule. The following
are this design's own choices:

* the multiplier's internal structure: 2 x 2 base cell, four-quarter
  combination per level, one carry-save adder per combination;
* unsigned operands and wrap-around accumulation;
* synchronous active-high reset to zero, with priority over `ce`;
* `ce` as a load enable for both the sum and the flag;
* bringing the overflow flag out as a port, and making it sticky;
* no pipeline registers: the multiplier and adder are one combinational
  path.

## Simulating

Each testbench checks its own results and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Run any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl tb/tb_mac_unit.sv --top-module tb_mac_unit
./obj_dir/Vtb_mac_unit
```

| testbench | what it checks |
|---|---|
| `tb_vedic_mul` | 16 x 16 on corner and 5000 random operands; 8 x 8 and 4 x 4 exhaustively |
| `tb_csa_adder` | W = 32 on corners and random triples; W = 8 exhaustively over two operands |
| `tb_acc_reg` | 1000 random cycles of reset, load and hold against a reference register |
| `tb_mac_unit` | the default unit: the 0..4 sequence, one-clock latency, about 4800 random cycles with holds, resets and overflows, against a 64-bit model |
| `tb_mac_configs` | N = 8 and N = 32: the 0..4 sequence, random and large-operand traffic, overflow |

`tb_mac_unit` counts how often the unit accumulated, held, was reset and
raised the overflow flag, and fails if any of these never happened;
`tb_mac_configs` does the same for the overflow flag at both sizes. Each testbench has a watchdog that ends the run with a failure if
it does not finish.

The N = 32 instance makes Verilator generate a large evaluation function, so
`tb_mac_configs` takes a few minutes to compile. The simulation itself runs
in well under a second.
