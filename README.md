# Variable-latency 32-bit Brent-Kung adder

Most long carries in a binary adder are short. For random operands a carry almost never has to
travel more than a few bit positions. A **variable-latency (speculative) adder** uses this. It
computes every carry from a limited window of lower bits, which is a shallow and fast network,
and delivers that sum in one clock cycle. A separate detector recognises the rare operands where
a carry runs further than the window. For those operands the speculative sum is thrown away and
an exact adder, which has two clock cycles to settle, supplies the right answer one cycle later.

This repository holds synthesizable SystemVerilog for such an adder, built around a **32-bit
Brent-Kung parallel-prefix adder**. The Brent-Kung adder is the exact adder used for
correction. It can also be used on its own: `brentkung32` is a plain combinational
`{c32, sum} = a + b + c0`.

```
            a, b, c0 ──► operand registers (held for 1 or 2 cycles)
                              │
          ┌───────────────────┴────────────────────┐
          ▼                                        ▼
  speculative path (1 cycle)              correction path (2 cycles)
  bk_pg_cell ×32                          brentkung32
  bk_spec_prefix  (16-bit window)           bk_pg_cell ×32
  bk_post_process                           bk_prefix_tree (Brent-Kung)
  bk_error_detect ──► spec_err              bk_post_process
          │                                        │
          └──────────► output select ◄─────────────┘
                 (speculative sum unless spec_err)
```

## Prefix addition in three stages

Every adder here is built the same way:

1. **Pre-processing** (`bk_pg_cell`, one per bit): the bit propagate `p_i = a_i ^ b_i` and the
   bit generate `g_i = a_i & b_i`.
2. **Carry generation** (the prefix network): *group* signals over spans of bits are formed from
   smaller spans. A span `i:j` generates a carry if its upper part `i:k` generates one, or if
   the upper part propagates and the lower part `k-1:j` generates one. It propagates if both parts
   do. The carry into bit `i+1` is the group generate of span `i:0`, where the carry in is folded
   in at bit 0.
3. **Post-processing** (`bk_post_process`): `s_i = p_i ^ c_i`. The carry out is `c_32`.

Two cells do the merging in step 2:

| cell | inputs | outputs | logic |
|---|---|---|---|
| `bk_black_cell` | G(i:k), P(i:k), G(k-1:j), P(k-1:j) | G(i:j), P(i:j) | G = G(i:k) \| P(i:k)·G(k-1:j); P = P(i:k)·P(k-1:j) (2 AND, 1 OR) |
| `bk_grey_cell`  | G(i:k), P(i:k), G(k-1:j)           | G(i:j)         | G = G(i:k) \| P(i:k)·G(k-1:j) (1 AND, 1 OR) |

A grey cell is a black cell without the propagate half. It is used wherever the merged span
already reaches bit 0. A span that reaches bit 0 is a finished carry, and its propagate is never
needed again. The design's efficiency comes from using grey cells wherever possible: every carry
of the word leaves the network through a grey cell.

## The Brent-Kung network (`bk_prefix_tree`)

A Brent-Kung network uses few cells and short wires, at the cost of about twice the logarithmic
depth. For `WIDTH = 2^L` it has three parts:

* **Carry-in fold**: one grey cell at bit 0 gives `G(0:-1) = g_0 | p_0·c_in`, so the carry in
  behaves like a generate below bit 0.
* **Up-sweep**, levels 1..L. A level with span `s` = 1, 2, 4, 8, 16 merges column `i` with
  column `i-s` when `(i+1) mod 2s == 0`. This builds the aligned groups 1:0, 3:2, 7:4, … and
  then 3:0, 7:0, 15:0, 31:0. The cell is grey when the result reaches bit 0 (`i+1 == 2s`).
  Otherwise it is black.
* **Down-sweep**, levels L+1..2L-1, with span `s` = 8, 4, 2, 1. Column `i` with
  `(i+1) mod 2s == s` and `i >= 3s-1` merges with the finished carry at column `i-s`, always
  through a grey cell. For example, 23:0 = 23:16 ∘ 15:0, then 11:0, 19:0, 27:0, and so on down to
  the even bits.

For 32 bits that is 9 cell levels after the carry-in fold. The network uses **26 black cells**
and **32 grey cells**: 5 in the up-sweep, 26 in the down-sweep and the carry-in cell. Columns
that have no cell at a level are plain wires (`g_pass` in the generate loop). The level arrays
`gl[level][bit]` and `pl[level][bit]` show the whole network, level by level, in a waveform
viewer. `WIDTH` must be a power of two; an elaboration-time assertion checks it.

## Speculation: the windowed network and its error condition

`bk_spec_prefix` keeps only the first `log2(WINDOW)` levels of a full prefix network and drops
the long-range ones. At level `s` = 1, 2, 4, 8 every column `i >= s` merges with column `i-s`,
in Kogge-Stone fashion. Afterwards column `i` holds the group over the window
`i : i-WINDOW+1`:

* speculative carry into bit `i+1`: `gw[i] = G(i : i-WINDOW+1)`. For `i < WINDOW` the window
  reaches bit 0 and the carry in, so the carry is exact.
* window propagate `pw[i] = P(i : i-WINDOW+1)`, which is meaningful for `i >= WINDOW`.

A speculative carry is wrong exactly when its whole window propagates *and* a carry enters the
window from below. `bk_error_detect` computes

```
err = OR over i = WINDOW .. WIDTH-1 of ( pw[i] & gw[i-WINDOW] )
```

Why this is exact: a carry that is missed was born at some generate at bit `q`, below the window.
It then ran through propagating bits into and across the window. So the window ending at
`q+WINDOW` propagates, and the window ending at `q` generates (its top bit is `q`). That term is
in the OR. Conversely, if a term is true, a carry really does enter a fully propagating window,
so the speculative carry at its top (or the carry out) is wrong. There are no false alarms and
no misses. The detector is 16 AND gates and a 16-input OR.

`WINDOW` defaults to 16, half the word: one pruned level of a 32-bit prefix network. On 400,000
random operand pairs, 31 were mis-speculated (about 1 in 13,000). The average latency for random
data is therefore 1.0001 cycles. Operands that carry across long runs of propagating bits, such
as `x + ~x + 1`, always take the slow path.

## Timing and handshake of `vl_bk_adder32`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (empties the adder) |
| `in_valid`, `in_ready` | in / out | 1 | an operation is accepted at a rising edge when both are high |
| `a`, `b`, `c0` | in | 32, 32, 1 | operands and carry in |
| `out_valid` | out | 1 | `sum`/`c32` hold a result in this cycle |
| `sum`, `c32` | out | 32, 1 | result |
| `out_corrected` | out | 1 | the result came from the correction path |
| `spec_err` | out | 1 | the held operation was mis-speculated (high during the stall cycle) |

An internal state machine has three states: `ST_EMPTY`, `ST_SPEC` (first cycle of an operation)
and `ST_CORR` (second cycle after a mis-speculation).

```
edge:            E0          E1          E2          E3
speculation ok:  accept A    result A    ...
                             out_valid=1, in_ready=1 (B may be accepted at E1)
mis-speculated:  accept A    spec_err=1  result A (out_corrected=1)
                             in_ready=0  out_valid=1, in_ready=1
```

* The result appears in the cycle after acceptance, or one cycle later after a mis-speculation.
  A new operation can be accepted at the edge that ends the current one. Without
  mis-speculations the adder takes one addition per cycle.
* There is no output back-pressure. The consumer must take the result in the cycle `out_valid`
  is high.
* `sum`/`c32` during a speculative result are combinational from the operand registers through
  the shallow windowed network. During `ST_CORR` they come from `brentkung32`. The operand
  registers hold their value for both cycles, so **operand registers → `brentkung32` → `sum`
  is a two-cycle path**. A timing flow should declare it as a multicycle path. Otherwise the
  exact adder sets the clock period and speculation gains nothing.
* An immediate assertion in the RTL checks every speculative result that is let through against
  the exact adder.

## Files

| file | contents |
|---|---|
| `rtl/bk_pkg.sv` | `BK_WIDTH = 32`, `BK_SPEC_WINDOW = 16`, `clog2_int` |
| `rtl/bk_pg_cell.sv` | bit propagate/generate |
| `rtl/bk_grey_cell.sv`, `rtl/bk_black_cell.sv` | prefix cells |
| `rtl/bk_prefix_tree.sv` | Brent-Kung carry network, parameter `WIDTH` |
| `rtl/bk_post_process.sv` | sum XOR stage |
| `rtl/brentkung32.sv` | exact adder, ports `a, b, c0, sum, c32` |
| `rtl/bk_spec_prefix.sv` | windowed speculative carry network, parameters `WIDTH`, `WINDOW` |
| `rtl/bk_error_detect.sv` | mis-speculation detector |
| `rtl/vl_bk_adder32.sv` | top: variable-latency adder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends itself. It also has a watchdog
that counts a failure if the simulation runs too long. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          --top-module tb_vl_bk_adder32 rtl/bk_pkg.sv tb/tb_vl_bk_adder32.sv
./obj_dir/Vtb_vl_bk_adder32
```

Replace the top module name to run any other testbench. Each one runs in well under a second of
wall-clock time.

What the testbenches check, each against a reference computed independently of the RTL:

* cells: all input combinations;
* `bk_prefix_tree`: every carry against the ripple recurrence `c[i+1] = g[i] | p[i]·c[i]`, for
  random `p`/`g` (including combinations no adder produces) and for a single generate under an
  all-propagate word;
* `brentkung32`: corner cases, carries from bit 0 to the carry out, `2 + 3 = 5`, and 5000
  random sums;
* `bk_spec_prefix` / `bk_error_detect`: window signals from integer sums of the window's operand
  bits, and `err` against a direct comparison of every windowed carry with the exact carry;
  operands are biased towards long propagate runs;
* `tb_vl_bk_adder32`: 4000 additions at the default size with random idle cycles. About a
  quarter of them are mis-speculated. Each result is checked for its value, the path it took and
  its latency (1 or 2 cycles), and the stall cycle is checked too. The test fails if any of these
  never happens: a speculative hit, a mis-speculation, a stall, back-to-back acceptance, an idle
  cycle or a carry in of 1.

## Where this design makes its own choices

The arithmetic (PG cells, black and grey cells, the Brent-Kung arrangement, the XOR sum stage)
and the external interface of the exact adder (`a`, `b`, `c0`, `sum`, `c32`) follow the design
this RTL implements. The variable-latency scheme is specified there only by what it does:
pre-processing, prefix, post-processing and error detection in series; speculation that fails
on a wrong carry; the speculative output discarded; the exact sum one clock period later from a
correction stage off the critical path. The following are therefore choices made here:

* **Speculative network shape and window.** A sliding window of `WINDOW = 16` bits built from the
  first four levels of a Kogge-Stone-style network. The window size comes from the rule
  "word width / 2^(pruned levels)" with one pruned level. Change it with the `WINDOW` parameter
  (a power of two below `WIDTH`).
* **Correction stage.** A complete `brentkung32` with its own PG cells. A more economical design
  would share the pre-processing cells and reuse the speculative levels, so that the correction
  stage holds only the levels that were pruned. That sharing is not done here.
* **Error condition.** The exact condition derived above.
* **Handshake, operand registers and reset.** Valid/ready input, valid-only output, asynchronous
  active-low reset.
* **Word organisation.** One 32-bit Brent-Kung tree, extended from the usual 16-bit drawing by
  the same rule, rather than two 16-bit halves.

Not modelled: power and area, and any FPGA-specific mapping of the cells. The RTL is
technology-independent. A synthesis tool is free to restructure the network unless the cell
modules are kept as hierarchy.
