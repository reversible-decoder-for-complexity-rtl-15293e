# Reversible-logic circuits: a Fredkin-gate decoder and what it builds

A reversible gate maps each input pattern to a distinct output pattern. It has
as many outputs as inputs, and its inputs can always be recovered from its
outputs. A circuit made only of such gates loses no information. That is the
property that ties it to low-power and quantum computing. Two rules follow,
and this RTL obeys both in its structure:

* **No fan-out.** A wire drives exactly one gate input. A signal needed twice
  is first copied with a Feynman gate.
* **No feedback** inside combinational logic. Unused gate outputs are left as
  *garbage* lines, and missing inputs are tied to constants.

The central circuit is a **reversible n-to-2^n decoder**. It grows one input
bit at a time from Fredkin gates. A full adder/subtractor, a multiplexer and
a comparator are then built on top of it, each output formed as the OR of the
decoder lines that belong to it. Alongside these come reversible arithmetic
and sequential circuits built from the same gate library:

* an 8-bit ripple-carry adder of TSG gates;
* an 8×8 Wallace tree multiplier and a 24×24 multiplier made from it;
* a master-slave D flip-flop and a clocked SR flip-flop;
* the control unit of a GCD processor.

Conventional (irreversible) versions of the adder, the multiplier and the
control unit are included as comparison baselines.

Every module is synthesizable SystemVerilog. The gates are written as their
Boolean equations, and the larger circuits are netlists of those gate
modules. A synthesis tool therefore optimises the reversible structure like
any other logic. The RTL documents and checks the reversible construction; it
does not preserve that construction through synthesis.

## The gate library

| gate | module | inputs | outputs | typical use here |
|---|---|---|---|---|
| Feynman (CNOT) | `feynman_gate` | A, B | P = A, Q = A⊕B | B=0: copy A; B=1: invert A; XOR into an accumulator |
| Fredkin | `fredkin_gate` | A, B, C | P = A; A=0: Q=B, R=C; A=1: Q=C, R=B | 2:1 multiplexer, AND with a constant-0 input, splitting a line in two |
| Peres | `peres_gate` | A, B, C | P = A, Q = A⊕B, R = AB⊕C | C=0: half adder |
| Toffoli (TF) | `toffoli_gate` | A, B, C | P = A, Q = B, R = AB⊕C | C=0: AND (partial products) |
| TSG | `tsg_gate` | A, B, C, D | P = A, Q = A'C'⊕B', R = Q⊕D, S = Q·D⊕(AB⊕C) | C=0: full adder, R = sum, S = carry, D = carry in |

The TSG equations are the standard published definition of the gate. The
circuits here rely only on its full-adder behaviour with C = 0.

## Copying and merging lines

Two small helpers carry the no-fan-out rule through the whole design.

* `rev_fanout #(K)` makes K copies of one signal. It uses a chain of K−1
  Feynman gates with zero targets. The original signal passes down the chain
  through the gates' control outputs. The GCD control unit's *regeneration
  module* is a set of these.
* `rev_merge #(L, MASK)` forms the OR of the decoder lines selected by
  `MASK`. Decoder outputs are one-hot, so that OR equals the XOR. The XOR is
  built with Feynman gates acting on one accumulator line that starts at 0.
  The selected lines come back out unchanged on `thru`, so the next merge
  chain can use them without fan-out.

## The decoder (`rev_decoder`)

The decoder has one stage per input bit. Lines are numbered so that
`out[i]` is high exactly when `in == i`.

1. **First stage.** A Feynman gate with its target tied to 1 turns the top
   input bit `x` into the pair (¬x, x). This is a 1-to-2 decoder.
2. **Each further bit** `y` doubles the number of lines. Every existing line
   `L` goes through one Fredkin gate with control `y`, B = `L` and C = 0. The
   Q output is L·¬y and the R output is L·y, so each line splits into two.
   The bit `y` is not fanned out. It enters the first Fredkin gate of its
   stage and is passed to the next gate on that gate's P output. The P output
   of the last gate is garbage.

The gate counts for each size are:

| decoder | gates | new in this stage |
|---|---|---|
| 1×2 | 1 Feynman | – |
| 2×4 | 1 Feynman + 2 Fredkin | 2 Fredkin |
| 3×8 | 1 Feynman + 6 Fredkin | 4 Fredkin |
| 4×16 (default, `N = 4`) | 1 Feynman + 14 Fredkin | 8 Fredkin |

The "2×4 followed by 4 Fredkin gates, 3×8 followed by 8 Fredkin gates"
recursion is the published construction. Starting the recursion at a single
Feynman gate is this design's choice. The published description of the
decoders also mentions a Peres gate, without saying where it goes, so none is
used in the decoder. For comparison, an earlier 4×16 design used 18 gates:
12 Fredkin, 1 Peres, 1 TR, 1 NOT and 3 CNOT. With the usual quantum costs
(Fredkin 5, Feynman 1) this 4×16 decoder costs 71. That figure is an outside
number, not a measured result.

## Circuits built on the decoder

**Full adder / full subtractor (`rev_full_add_sub`).** A 3×8 decoder on
{a, b, cin} produces the minterm lines m0 to m7. The outputs are:

| output | minterms | meaning |
|---|---|---|
| `s` | m1, m2, m4, m7 | a⊕b⊕cin, both the sum and the difference |
| `cout` | m3, m5, m6, m7 | carry of a + b + cin |
| `borrow` | m1, m2, m3, m7 | borrow of a − b − cin |

m1, m2 and m3 each feed two outputs, and m7 feeds three. They are copied
first, and m0 is garbage.

**Multiplexer (`rev_mux`, 4-to-1 by default).** A decoder on `sel` produces
one line per data input. Each line is ANDed with its data bit by a Fredkin
gate with control = d[i], B = 0 and C = line. The gated lines are then merged.

**Comparator (`rev_comparator`, 2-bit by default).** A 4×16 decoder runs on
{a, b}, and line i stands for a = i >> W, b = i mod 2^W. The `equal`, `less`
(a < b) and `greater` masks are computed at elaboration. Three merge chains
then use the lines one after the other.

## Arithmetic

**Ripple-carry adder (`rev_rca`, `WIDTH = 8`).** Each bit is one TSG gate
with A = a[i], B = b[i], C = 0 and D = carry in. R is the sum bit and S the
carry out. With `HALF_LSB = 1` the carry input is ignored and bit 0 is a
Peres half adder. The multipliers' final adders use that form.

**Carry-save row (`rev_csa`).** A row of TSG full adders reduces three
vectors to two, so that x + y + z = s + c. The carry vector is already
shifted up one place, and the carry out of the top position is dropped. The
caller must size `WIDTH` so that the total fits, which makes the dropped
carry always 0. `rev_csa_tree` chains these rows into a row-level Wallace
tree: it takes rows three at a time until two are left, then adds them.

**Wallace tree multiplier (`rev_wallace_mult`, `N = 8`).** The multiplier
has three steps:

1. **Partial products.** An N×N grid of Toffoli gates with C = 0 forms the
   bits a[i]·b[j]. Bit a[i] travels down its column of gates and b[j] along
   its row, on the gates' pass-through outputs, so no input bit fans out.
2. **Reduction.** The reduction works column by column, in stages. Column c
   holds the bits of weight 2^c. In each stage, a column of height h gets
   h/3 TSG full adders, plus one Peres half adder if two bits are left over.
   Sums stay in their column, carries move up one column, and any other
   bits pass through unchanged. For 8×8 the tallest column goes
   8 → 6 → 4 → 3 → 2 in four stages, using 36 full adders and 25 half
   adders. The plan for every stage is computed at elaboration by functions
   in the module: the column heights, the gate counts, and which wire each
   bit lands on.
3. **Final addition.** The two remaining rows go through a 16-bit TSG
   ripple-carry adder whose lowest bit is a Peres gate.

The gate types come from the published multiplier: Toffoli partial
products, TSG full adders and Peres half adders. The allocation rule is the
classic Wallace one. The published gate placement cannot be recovered bit
for bit, so the two layouts may differ in detail.

**24×24 multiplier (`rev_mult24`, `BLK = 8`, `K = 3`).** Each operand is
cut into three 8-bit digits, and every digit is copied three times with
Feynman gates. The nine digit products come from nine 8×8 Wallace
multipliers. They are shifted into place and summed by `rev_csa_tree`, whose 48-bit rows
go 9 → 6 → 4 → 3 → 2, followed by a 48-bit adder.

All of these circuits are purely combinational.

## Sequential circuits

**D latch (`rev_dlatch`).** The held value is stored in a level-sensitive
latch that copies `d` while `en` = 1. A Fredkin gate with control = `en`,
B = held value and C = `d` shows `d` while the latch is open and the held
value while it is closed. A Feynman gate with target 1 then gives `q` and
`q_n`. A pure gate netlist would close the Fredkin multiplexer around its
own output. That is the same function, but tools see it as a combinational
loop, so the storage is written as an explicit latch.

**D flip-flop (`rev_dff`).** The flip-flop is built as follows:

* The master latch is enabled by `clk`.
* The slave latch is enabled by `clk` through an inverter.
* **`q` takes the value `d` had at the falling edge of `clk`**, and holds it
  for a full cycle.
* After the slave, a Fredkin gate with control = q, B = 1 and C = 0 gives
  `q_bar` on Q and `q` on R.
* A Feynman gate then copies `q` to `q_copy`.
* `rst` is synchronous and active high. It works through a Fredkin gate that
  forces the data input to 0, so it acts at a falling edge. The reset is
  this design's addition.

**SR flip-flop (`rev_srff`).** This is a gated SR latch that is transparent
while `clk` is high:

* `s` alone sets `q`, and `r` alone resets it.
* `s` = `r` = 1 drives `q` and `qbar` both high. If the clock then falls
  with both still high, `q` settles to 0.
* With `clk` low, or with `s` = `r` = 0, the state holds.
* There is no reset, so `q` is unknown until the first set or reset.

The storage is a `rev_dlatch`. Its data input is s AND NOT r, formed by a
Fredkin gate with control r, B = s and C = 0. Its enable is clk AND (s OR r):
a Fredkin gate with C = 1 gives the OR, and a Toffoli gate adds the clock.
Two Toffoli gates form clk AND s AND r. While that term is high the latch
holds 0, so a Feynman gate can add it to the stored bit to give `q`. `qbar`
is the latch's complement output. This behaviour is read from a published
simulation waveform. The gate network is this design's.

**GCD control unit (`gcd_control_unit`).** This unit sequences a
subtract-compare-swap GCD datapath. It repeatedly subtracts the smaller
number from the larger one until the two are equal. The datapath itself is
not part of the design. It must hold two numbers x and y, report
`eq` = (x == y) and `lt` = (x < y), and obey `load`, `swap` and `sub`. The
unit has three parts:

* `gcd_ff_unit` holds the state: two reversible D flip-flops with binary
  encoding.
* `gcd_regen_unit` holds Feynman copies of the state bits and inputs: six of
  each state bit, three of `eq`, two of `lt` and four of `start`.
* `gcd_op_unit` computes the next state and the controls. Each of its six
  outputs is a 4:1 Fredkin multiplexer (`fredkin_mux4`) selected by the
  state.

The states and outputs are this design's reading of the algorithm. Their
codes are in `gcd_pkg`:

| state | code | outputs (Mealy) | next |
|---|---|---|---|
| IDLE | 00 | `load` = start | start ? CMP : IDLE |
| CMP | 01 | `sub` = ¬eq·¬lt | eq ? DONE : lt ? SWAP : CMP |
| SWAP | 10 | `swap` = 1 | CMP |
| DONE | 11 | `done` = 1 | start ? DONE : IDLE |

Timing works like this:

* The state changes at the falling edge of `clk`.
* A datapath clocked at the same falling edge acts on the controls of the
  ending cycle. Its new `eq` and `lt` then decide the next edge.
* After the load edge, each compare and each swap takes one cycle. Computing
  GCD(48, 18) takes 9 cycles from the load edge to `done`.
* `done` stays high until `start` is dropped.
* Operands must be non-zero. With y = 0 the unit subtracts forever.

Lint reports a loop from the state through `gcd_op_unit` and back. The loop
passes through the two master-slave latch pairs, which are never transparent
at the same time.

## Conventional baselines

The reversible adder, multiplier and control unit are meant to be compared
with ordinary gate-level versions of the same circuits. Three such baselines
are included, each with the interface and default size of its reversible
counterpart:

* **`irr_rca`.** An 8-bit ripple-carry adder of textbook full adders:
  sum = a⊕b⊕c and carry = ab + c(a⊕b). The carry passes through every bit
  in turn, so its critical path is the chain of carry gates.
* **`irr_wallace_mult`.** An 8×8 Wallace multiplier. AND gates form the
  partial products. The column reduction follows the same Wallace rule as
  `rev_wallace_mult`, with ordinary full and half adders, and `irr_rca`
  adds the last two rows.
* **`irr_gcd_control_unit`.** The same four-state machine written as a
  two-bit state register with next-state and output logic. It captures at
  the falling edge, like the reversible flip-flops, so both units give the
  same outputs in every cycle and can share one datapath.

These baselines fan signals out freely and produce no garbage lines. Their
gate-level forms are this design's choice; only the existence and size of
each comparison circuit come from the source.

## Top level (`reversible_top`)

The circuits are independent of one another, so the top places them side by
side. Each has its own ports, grouped by prefix:

| prefix | circuit | ports |
|---|---|---|
| `dec_` | 4×16 decoder | `dec_in[3:0]`, `dec_out[15:0]` |
| `fas_` | full adder/subtractor | `fas_a`, `fas_b`, `fas_cin` → `fas_s`, `fas_cout`, `fas_borrow` |
| `mux_` | 4-to-1 multiplexer | `mux_d[3:0]`, `mux_sel[1:0]` → `mux_y` |
| `cmp_` | 2-bit comparator | `cmp_a`, `cmp_b` → `cmp_equal`, `cmp_less`, `cmp_greater` |
| `rca_` | 8-bit adder | `rca_a`, `rca_b`, `rca_cin` → `rca_sum`, `rca_cout` |
| `mul_` | 8×8 multiplier | `mul_a`, `mul_b` → `mul_p[15:0]` |
| `m24_` | 24×24 multiplier | `m24_a`, `m24_b` → `m24_p[47:0]` |
| `dff_` | D flip-flop | `dff_d` → `dff_q`, `dff_q_bar` |
| `sr_` | SR flip-flop | `sr_s`, `sr_r` → `sr_q`, `sr_qbar` |
| `gcd_` | GCD control unit | `gcd_start`, `gcd_eq`, `gcd_lt` → `gcd_load`, `gcd_swap`, `gcd_sub`, `gcd_done` |
| `irr_` | conventional baselines | `irr_rca_sum`, `irr_rca_cout` (on the `rca_` inputs), `irr_mul_p` (on the `mul_` inputs), `irr_gcd_load`, `irr_gcd_swap`, `irr_gcd_sub`, `irr_gcd_done` (on the `gcd_` inputs) |

`clk` and `rst` are shared by the D flip-flop and both GCD control units;
the SR flip-flop uses `clk` as its enable.
After synthesis the top is about 5,900 word-level cells. Its only storage is
7 latch bits in the reversible circuits and the two state flip-flops of the
conventional GCD control unit.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and carries a watchdog. Build and run
one with Verilator 5:

```sh
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/gcd_pkg.sv \
    tb/tb_reversible_top.sv --top-module tb_reversible_top --Mdir obj -o sim
./obj/sim
```

To run another testbench, replace the testbench file and the top-module name.
`gcd_pkg.sv` must come first for anything that contains the GCD control unit.
Here is what the testbenches cover:

* **Exhaustive tests.** All gates, the decoder (4×16, 3×8 and 2×4), the full
  adder/subtractor, the multiplexer, the comparator (2- and 3-bit), the 8-bit
  adder (both forms), the 8×8 multiplier (all 65,536 products) and the
  conventional adder and multiplier.
* **Random tests.** The 24×24 multiplier and the carry-save row use random
  operands together with corner cases.
* **Clocked tests.** The latch, flip-flop and state-register tests move the
  data in both clock phases and inject resets. The SR flip-flop test replays
  the published waveform and then random set/reset levels.
* **`tb_gcd_control_unit` and `tb_irr_gcd_control_unit`.** Each runs about
  a hundred GCDs against a behavioural datapath. It checks each result
  against Euclid's algorithm and checks the cycle count against a count of
  the compare and swap steps.
* **`tb_reversible_top`.** Runs the top at its default sizes. It counts each
  mechanism (every decoder line, carry, borrow, each comparator relation,
  flip-flop reset and capture, SR set, reset and s = r = 1, GCD swap,
  subtract and done) and fails if any never occurred. It also compares each
  conventional baseline with its reversible counterpart on every operation
  and in every clock cycle.

## Where this design goes beyond, or differs from, its source

* **Fredkin equations.** The gate is implemented as the controlled swap
  (A=0: Q=B, R=C; A=1: Q=C, R=B). A form that prints R = AC⊕A'B makes R
  identical to Q and is not reversible, so it is not used.
* **Decoder.** The recursion starts from one Feynman gate, and no Peres gate
  is used. Gate counts are in the table above.
* **Minterm assignment.** The decoder line assignment for the adder,
  subtractor, multiplexer and comparator, the 4-to-1 multiplexer size, and
  the subtractor's borrow convention (a − b − cin) are choices made here.
* **Wallace multiplier.** The allocation is the classic Wallace rule, and the
  final adder is a ripple-carry adder. The published layout is not
  reproduced gate for gate.
* **24×24 multiplier.** It is named but not detailed in the source. Its
  digit decomposition and summation are this design's.
* **TSG pin assignment.** The TSG gate's pin assignment as a full adder
  (C = 0, D = carry in) is assumed.
* **Flip-flop and GCD control unit.** Capture at the falling edge follows
  from the latch arrangement (slave behind the inverter). The reset, the
  four-state machine, the Mealy outputs, the control names and the
  half-cycle datapath timing are this design's.
* **SR flip-flop.** Only a waveform is published. Reading it as a gated
  latch rather than an edge-triggered flip-flop, and the gate network, are
  this design's choices.
* **Not built:** the GCD datapath, which the source does not describe.
* **No timing, power or area claims.** The published delay, power and LUT
  comparisons came from FPGA implementation runs. This RTL makes no such
  claims, and a synthesis tool will not keep the reversible gate structure.
