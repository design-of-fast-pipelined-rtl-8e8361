# Pipelined carry-look-ahead adder and multiplier

A carry-look-ahead (CLA) adder computes every carry in O(log n) gate levels.
The levels are a tree: generate/propagate signals go up, and carries come back
down. This design puts a register row between every two levels of that
tree. The clock period is then the delay of one small CLA cell, whatever
the word width. The adder takes a new operand pair on every clock and
delivers one result per clock, 2·log_B(n) − 2 clocks after its operands.
Throughput matters here, latency does not. This suits a stream of data, such
as an image filter, that needs one addition or comparison per sample.

Stacking *m* of these adders, one per multiplier bit, gives a multiplier
that also delivers one n×m-bit product per clock. The product of operands
that went in together comes out about m·2·log n clocks later.

The RTL follows the published architecture (“Design of fast pipelined
arithmetic units in VLSI”): its stage structure, its cell types PG, BPG,
BG, CP and S, and its multiplier organisation. Widths of the multiplier, the
handshake, the reset and the min/max method are choices made here. They
are listed under [Departures and choices](#departures-and-choices).

## The adder pipeline

Let *B* be the blocking factor: how many inputs each look-ahead cell
combines. Let *N* = B^L be the word width. The default is N = 32 and B = 2,
so L = 5. The stages, each closed by a register row except the last, are:

| stage | cells | what one cell does |
|---|---|---|
| 1 | N/B × **PG** | from B bit pairs: g = a·b, p = a+b, folded into one group P, G |
| 2 … L−1 | **BPG** rows | B blocks' P, G → P, G of the block spanning them |
| L | one **BG** | top B blocks' P, G and carry-in c0 → carry into each top block, carry-out |
| L+1 … 2L−2 | **CP** rows | carry into a block + P, G of its B sub-blocks → carry into each sub-block |
| 2L−1 | N/B × **S** | carry into a B-bit group + its a, b bits → B sum bits, internal look-ahead |

For N = 32 and B = 2 the pipeline runs PG (16 cells) → BPG (8) → BPG (4) →
BPG (2) → BG (1) → CP (2) → CP (4) → CP (8) → S (16). That is nine stages
and eight register rows, so the latency is **8 clocks**.

All cells use the same recurrence, written as full look-ahead over the
cell's B inputs:

    G_block = G_{B-1} + P_{B-1}·G_{B-2} + … + P_{B-1}…P_1·G_0
    P_block = P_{B-1}·…·P_0
    c_j     = G_{j-1} + P_{j-1}·G_{j-2} + … + P_{j-1}…P_0·c_in

The propagate signal is the OR a+b, not the XOR. That is enough for carries.
The S cell forms the XOR itself when it makes the sum bits.

### What travels down the pipe

The subtle part of the design is which signals are still needed in later
stages. These are carried through every register row in between
(`pipe_delay`):

* **a, b and the operation** go from the input to the S row: 2N + 2 bits
  for 2L − 2 clocks. S rebuilds p, g from them, and the min/max select needs
  them.
* **The carry-in** goes to the BG stage: L − 1 clocks.
* **The P and G of level k** (k = 1 … L−2) are made at row k and used by
  the CP row that splits level-(k+1) blocks. That CP row closes at row
  2L − k − 1, so they wait 2L − 2k − 2 extra clocks. Level-1 P/G wait
  longest (6 clocks at the default size). The top level feeds BG directly.
* **The carry-out** leaves BG at row L and waits L − 2 clocks for the
  result.

The tree roughly doubles the data path in its upper half. It carries 2N
operand bits plus 2N/B·(1 + 1/B + …) ≤ 2N/(B−1) P/G bits. In the lower half
it shrinks again: each CP row consumes one P/G pair per carry it makes.

### Min, max and pass

The adder also does the three other operations a filtering datapath needs:

* **MIN / MAX:** stage 1 feeds ~b and a carry-in of 1 into the same tree,
  which computes a − b. The carry-out is then the unsigned a ≥ b flag. At
  the S row it selects a or b (taken from the copies carried down the pipe).
  The operation code travels with the data, so operations can be mixed
  freely from clock to clock.
* **PASS** returns a.
* **ADD** returns a + b + cin.

`cout` is the carry-out of a + b + cin for ADD and PASS, and a ≥ b for
MIN and MAX.

## The multiplier

`pipelined_multiplier` is an unsigned N×M multiplier, 32×32 by default. It
has an input register row followed by M rows (`mult_stage`). Row k:

1. ANDs the multiplicand A with multiplier bit B_k (the adder's front end).
   When B_k = 0 the row adds zero, so the partial product is only shifted.
2. Adds that to the upper N bits of the running partial product, using a
   full pipelined adder. Row 1 adds to zero.
3. Registers the result in the row register. The lowest sum bit is product
   bit P_k and is final. The carry-out and the other N−1 sum bits become the
   upper partial product for row k+1, so the partial product moves one place
   right each row. A and the finished low product bits travel beside the
   adder in delay lines of the adder's latency.

One row takes D = adder latency + 1 clocks: 9 clocks at the default size. So
multiplier bit B_k must arrive (k−1)·D clocks after the operands. Each bit
therefore passes a skew buffer of that depth (D, 2D, …, (M−1)D) after the
input register. After row M, `product = {upper partial product, P_M … P_1}`
holds N + M bits.

**Latency:** 1 + M·D clocks, which is 289 at the default size. After that,
one product per clock.

## Interfaces and timing

Every unit samples its inputs on the rising edge of `clk`. There is no
back-pressure: a result is simply valid LATENCY clocks after its inputs,
with `valid_out` set. An idle clock (`valid_in` = 0) passes through as a
bubble, so a stream may stop and restart without flushing. `rst_n` is
asynchronous and active-low. It clears only the valid flags, because the
data registers need no reset.

| module | inputs | outputs | latency (default) |
|---|---|---|---|
| `pipelined_adder #(N=32,B=2)` | `valid_in, op, a[N], b[N], cin` | `valid_out, result[N], cout` | 2·log_B N − 2 (8) |
| `pipelined_multiplier #(N=32,M=32,B=2)` | `valid_in, a[N], b[M]` | `valid_out, product[N+M]` | 1 + M·(2·log_B N − 1) (289) |
| `pipelined_arith_top #(N=32,M=32,B=2)` | both of the above, prefixed `add_` / `mul_` | same | same |

The adder's result comes straight from the S row's logic after the last
register row, with no register after it. To register it, add a row outside.
`op` is `cla_pkg::op_e`: ADD = 0, MIN = 1, MAX = 2, PASS = 3.

N must be a power of B with at least two levels (N ≥ B²). Elaboration stops
with an error otherwise. Some sizes that work: 16/B=4 (latency 2), 27/B=3
(4), 32/B=2 (8), 64/B=2 (10), 81/B=3 (6).

## Files

| file | contents |
|---|---|
| `rtl/cla_pkg.sv` | `op_e`, level count and latency functions |
| `rtl/pg_unit.sv`, `bpg_unit.sv`, `bg_unit.sv`, `cp_unit.sv`, `sum_unit.sv` | the five look-ahead cells (combinational) |
| `rtl/pipe_delay.sv` | register chain, used for all carried signals and skew buffers |
| `rtl/pipelined_adder.sv` | the adder pipeline |
| `rtl/mult_stage.sv` | one multiplier row |
| `rtl/pipelined_multiplier.sv` | the multiplier |
| `rtl/pipelined_arith_top.sv` | both units side by side |
| `tb/tb_*.sv` | self-checking testbenches; `adder_stream_check.sv` and `mult_stream_check.sv` are reusable stream checkers |

## Simulating

Each testbench prints one line, `TB_RESULT checks=<n> failures=<n>`. For
example:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_pipelined_arith_top \
        rtl/cla_pkg.sv tb/tb_pipelined_arith_top.sv
    ./obj_dir/Vtb_pipelined_arith_top

Replace the module name for other testbenches. What each one covers:

* `tb_pg_unit`, `tb_bpg_unit`, `tb_bg_unit`, `tb_cp_unit`, `tb_sum_unit`:
  exhaustive tests for B = 2 and B = 3 or 4.
* `tb_pipe_delay`: delay lines of depth 0, 1 and 6, with and without reset.
* `tb_pipelined_adder`: random mixed-operation streams with bubbles at
  32/B=2, 27/B=3 and 16/B=4. It checks every result and that the latency is
  exact.
* `tb_adder_workloads`: the same at 64/B=2 and 81/B=3.
* `tb_mult_stage`: one multiplier row.
* `tb_pipelined_multiplier`: streams at 32×32, 8×5 and 9×4 (B=3), checking
  every product and the latency.
* `tb_pipelined_arith_top`: both units at full default size at the same
  time. It counts each mechanism and fails if one never occurs: every
  operation, both outcomes of MIN and MAX, carry-out, a 32-bit carry ripple,
  bubbles, back-to-back results, and zero and one multiplier bits.

In these testbenches the reference models are plain integer arithmetic, and
latencies are checked to the clock. The cells are checked exhaustively. The
adders and multipliers are checked with random streams, which are not proof
of correctness for every operand. The 32×32 multiplier compiles in about
half a minute with Verilator.

## Departures and choices

Taken from the published design:

* The stage sequence PG/BPG/BG/CP/S.
* A register row after every stage but S.
* Carrying a, b and the per-level P/G down the pipe.
* Carry-in delivered to BG.
* OR-type propagate.
* The 32-bit, B = 2 size.
* The multiplier made of one gated adder per multiplier bit.
* Row registers, zero initial partial product, and skew buffers of
  (k−1)·D on the multiplier bits.

Chosen here:

* Each PG cell already folds its B bits into one group P/G, so stage 1
  passes on N/B pairs.
* S re-derives p, g and the XOR from a and b, instead of receiving p and g.
* The method for min/max (subtract and select), unsigned operands, and the
  operation encoding.
* A valid flag, and a reset of the valid flags only. The original uses no
  global signal besides power and clock.
* Multiplier size N = M = 32, because the original gives none.
* The multiplier bits are registered together with the multiplicand.
* The product has the full N + M bits.
* The "latches" between stages are edge-triggered registers.

Not built:

* Multiplier recoding, which would halve the number of rows. It is mentioned
  only as a possibility.
* The variant that carries a⊕b instead of a and b.
* The recursive layout that keeps the adder's width linear in n. That layout
  is physical and has no effect on the RTL's function.
* The video processor that used the adder. The non-pipelined reference CLA
  it is compared with is also not built.
