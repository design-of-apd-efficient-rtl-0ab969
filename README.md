# Area-delay-power efficient square-root carry-select adder

A conventional carry-select adder duplicates a ripple-carry adder for every
block: one copy assumes an incoming carry of 0, the other an incoming carry of
1, and a multiplexer picks one of the two sums once the real carry is known.
That buys speed at roughly twice the area and power.

The adder here removes most of that duplication. Each carry-select block
computes the bitwise half-sum and carry words once. From them it derives only
two *carry words*, not two sums: one for an input carry of 0 and one for an
input carry of 1. The real input carry then selects a carry word, and a single
XOR per bit forms the sum. The input carry of a block enters only in these
last two stages. So when many blocks are chained into a wide adder, the carry
crosses each block through a single AND-OR gate.

Blocks of growing width are chained into a *square-root carry-select adder*
(SQRT-CSLA). The default build is 32 bits wide. The RTL is purely
combinational: it has no clock, no reset and no latency.

## Structure of one carry-select block (`csla`)

For a W-bit block with operands `a`, `b` and input carry `cin`:

| stage | module | computes |
|-------|--------|----------|
| Half Sum Generator | `hsg` | `s0 = a ^ b`, `c0 = a & b` |
| Carry Generator, cin = 0 | `cg0` | `c10[0] = c0[0]`; `c10[i] = c0[i] \| (s0[i] & c10[i-1])` |
| Carry Generator, cin = 1 | `cg1` | `c11[0] = c0[0] \| s0[0]`; `c11[i] = c0[i] \| (s0[i] & c11[i-1])` |
| Carry Select | `cs` | `c = c10 \| (cin & c11)`, `cout = c[W-1]` |
| Final Sum Generator | `fsg` | `s[0] = s0[0] ^ cin`; `s[i] = s0[i] ^ c[i-1]` |

The carry-select stage is the subtle part. It is a 2:1 multiplexer per bit,
choosing `c10` when `cin = 0` and `c11` when `cin = 1`. A position that
produces a carry with input carry 0 also produces one with input carry 1, so
`c10[i] = 1` implies `c11[i] = 1`. The multiplexer therefore reduces to
`c10[i] | (cin & c11[i])`: one AND and one OR per bit.

`cg0` and `cg1` are ripple chains over the block's own bits, each with the
known input carry folded in. They work while the carry from lower blocks is
still on its way. Only `cs` and `fsg` wait for it.

## The square-root chain (`sqrt_csla`)

```
 bit:  31..29  28..22  21..16  15..11  10..7  6..4  3..2  1..0
       csla3   csla7   csla6   csla5   csla4  csla3 csla2  rca2   <- r
 cout <-------- one AND-OR per block (inside each cs) ---------
```

- Bits 1:0 use a 2-bit ripple-carry adder (`rca`, built from `full_adder`
  cells) that takes the adder's input carry `r`.
- Above it sit carry-select blocks of width 2, 3, 4, 5, 6 and 7.
- The last block covers only the 3 bits that remain, not a full 8.

Each block is one bit wider than the block below it. A wider block needs
longer to produce its carry words, and it also gets more time before the carry
from below arrives. The growing widths balance these two delays.

The layout is worked out at elaboration time in `csla_pkg`. The rule is: the
2-bit RCA first, then blocks of width 2, 3, 4, …, each limited to the bits
still left. For N = 32 and N = 16 (2 | 2 3 4 5) this rule gives the layouts
the design is defined with. For other widths the rule is this design's own
extension:

| N | layout (RCA \| blocks) |
|---|------------------------|
| 16 | 2 \| 2 3 4 5 |
| 32 (default) | 2 \| 2 3 4 5 6 7 3 |
| 64 | 2 \| 2 3 4 5 6 7 8 9 10 8 |
| 128 | 2 \| 2 3 … 15 7 |

`N` must be at least 3. An initial assertion rejects any layout that does not
cover the adder.

## Interface

`sqrt_csla #(parameter int unsigned N = 32)`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `p` | in | N | addend |
| `q` | in | N | addend |
| `r` | in | 1 | input carry |
| `sum` | out | N | `(p + q + r) mod 2^N` |
| `cout` | out | 1 | output carry |

This is 3N + 2 pins, for example 98 at N = 32. The outputs are a
combinational function of the inputs. Register them outside the adder if a
pipeline is needed.

The building blocks `csla`, `hsg`, `cg0`, `cg1`, `cs`, `fsg` and `rca` each
take a width parameter `W` and can be used on their own.

## What follows the reference design and what is a choice here

Taken from the reference design:
- the decomposition into HSG, CG0/CG1, CS and FSG;
- the half-sum equations;
- the carry-select behaviour and its AND-OR simplification;
- the final-sum equations;
- the 2-bit RCA followed by 2…7-bit blocks and a final 3-bit block at 32 bits;
- the 16, 32, 64 and 128-bit sizes;
- the port names `p`, `q`, `r`, `sum` and `cout`.

Choices made here:
- **CG0/CG1 gates.** The carry generators are written as the generate/propagate
  ripple with the fixed input carry folded in. The reference design specifies
  their function, not their exact gate netlist. Any gate-level optimisation
  beyond this is left to synthesis.
- **Layouts for 64 and 128 bits** follow the rule above. They are not a
  published split.
- **The RCA** is built from textbook full adders.
- **No timing model.** The source's delay and LUT figures come from an FPGA
  implementation, and nothing here reproduces them.

In `cg0`, bit 0 of the carry-0 word is the carry word's bit 0 passed straight
through. This is inherent to a fixed input carry of 0.

## Verification

Each testbench in `tb/` checks itself. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_hsg`, `tb_cg0`, `tb_cg1`, `tb_cs`, `tb_fsg` | exhaustive at W = 4, against integer addition or truth tables |
| `tb_csla`, `tb_rca` | exhaustive at every width from 1 to 6 |
| `tb_sqrt_csla` | 32-bit adder at default parameters (details below) |
| `tb_sqrt_csla_widths` | 16-, 64- and 128-bit builds (details below) |

`tb_sqrt_csla` uses directed vectors (among them 131072 + 131072 = 262144)
and 20 000 random operand sets. About a quarter of the random sets are chosen
so that long propagate runs occur. It counts each carry mechanism and fails
if any of them never happens:
- an RCA carry out;
- each block seeing both input carries;
- each block whose output carry is decided by its input carry;
- a carry going all the way from `r` to `cout`.

`tb_sqrt_csla_widths` includes the 16-bit example
32768 + 32768 + 1 = 65537.

To run one testbench with Verilator:

```
verilator --binary --timing --assert --top-module tb_sqrt_csla \
  -y rtl -y tb +libext+.sv rtl/csla_pkg.sv tb/tb_sqrt_csla.sv
./obj_dir/Vtb_sqrt_csla
```

Change the adder width with `sqrt_csla #(.N(...))`. The group layout follows
automatically.
