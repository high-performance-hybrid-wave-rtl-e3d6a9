# Hybrid wave-pipelined parallel adder, and a carry-lookahead adder with carry prediction

A conventional pipeline cuts logic into stages with registers, and its clock period can be no
shorter than the slowest stage plus register overhead. A *wave pipeline* removes the internal
registers and launches a new operand set ("wave") before the previous one has left the logic.
Its period is then limited by the *spread* between the slowest and the fastest path, not by the
slowest path itself. A *hybrid wave pipeline* sits between the two. It puts a few internal
registers back to re-align the waves, and it clocks each of them with a copy of the clock that
has been delayed as much as the data. A clock edge therefore travels through the circuit
together with the wave it launched. Each stage still holds several waves at once, and the
spread per stage is smaller than across the whole circuit, so the clock can be faster than in
either of the other schemes.

This repository holds synthesizable SystemVerilog for two adders:

1. **`hwp_adder`**: a 32-bit parallel-prefix adder cut into three hybrid wave-pipelined stages.
   The stages hold 3, 2 and 3 waves, 8 in all. This is the main design.
2. **`cla16_pred`**: a 16-bit carry-lookahead adder built from 4-bit blocks. Each block
   *predicts* its carry out from its own operands, so the carry does not have to ripple from
   block to block in most cases.

The two are unrelated circuits. `hwp_top` places them side by side; they share only `clk`.

RTL describes logic and cycles, not analog delays. The electrical side of the scheme is not in
the RTL: biased gates with pattern-independent delay, delay padding, and clock-delay inverter
trees. What the RTL does reproduce exactly is the *logic* of every cell and the *cycle
behaviour* of the waves. The section "What is modelled and what is not" sets out where the line
is.

## The parallel adder

The adder has three blocks, and every bit column has the same depth:

```
 a, b ──► (g,p) generator ──► carry tree (5 levels) ──► sum generator ──► sum, cout
            g = a & b           prefix cells             s0 = p0
            p = a ^ b                                    si = pi ^ c(i-1)
```

There is no carry input; the lowest sum bit is the lowest propagate bit. `cout` is the carry
out of bit 31.

### Carry tree and its four cells

The carry tree (`carry_block`) has log2(32) = 5 levels, with one `prefix_cell` per bit per
level. Here "l" is the cell's own column and "r" the lower-order column it combines with. The
cell operator is the usual one:

    (g_l, p_l) o (g_r, p_r) = (g_l | p_l & g_r,  p_l & p_r)

| kind            | drawn as      | does                                               |
|-----------------|---------------|----------------------------------------------------|
| `BLACK_CIRCLE`  | filled circle | combines g and p                                   |
| `BLACK_SQUARE`  | filled square | combines g only; the result is already a carry     |
| `WHITE_CIRCLE`  | open circle   | padding: passes f, g, p through two NAND levels    |
| `WHITE_SQUARE`  | open square   | padding: passes f, g through two NAND levels       |

Every output of every cell is exactly two NAND2s deep, with `biased_nand2` wired as an inverter
where only one input is needed. This is why the padding cells exist: in silicon they make all
columns equally slow, which keeps the waves coherent. In logic they are identity functions.

Which cell sits where follows a divide-and-conquer pattern; `hwp_pkg::cell_kind()` computes it.

* At level *k*, a bit *i* whose index has bit *k-1* set combines with bit
  `floor(i / 2^(k-1)) * 2^(k-1) - 1`, the top of the aligned block just below it.
* The result is a complete carry (square) when *i* < 2^k. Otherwise it is a group pair (circle).
* All other bits are padding. A padding cell is square when the group it carries is a single
  bit, or is already complete. In those cases no separate group propagate is needed.

After level 5, `g[i]` is the carry out of bit *i*.

The extra signal **f** is each column's own propagate bit. It is carried up the tree next to g
and p, so the sum XOR receives it at the same depth as the carry. Where a column's group is a
single bit, its group propagate *is* f. Square cells therefore have no p output, and drive it to
0.

## Stages and waves (the part to read carefully)

Four registers bound the three stages:

| stage | logic between registers                      | waves held (`WAVES_Sk`) |
|-------|----------------------------------------------|-------------------------|
| 1     | register 1 → (g,p) generator, tree levels 1–2 → register 2 | 3 |
| 2     | tree level 3 → register 3                    | 2 |
| 3     | tree levels 4–5, sum generator → register 4  | 3 |

The split at levels 2 | 3 | 4–5 is this design's choice, made by hand. The published delays
make stage 2 about half as long as stages 1 and 3, and this split has the same shape. The split
is set by the parameters `S1_LAST_LEVEL` and `S2_LAST_LEVEL`.

**How waves map to cycles.** Take a wave launched from register 1 at input-clock edge *k*. In
the circuit it travels through stage 1 while further waves follow it. Register 2's delayed clock
edge, which is the copy of edge *k*, reaches register 2 just as the wave does. Counted in
input-clock edges, that is edge *k + WAVES_S1*. `wave_stage_reg` reproduces this cycle for
cycle:

* **Flight slots.** Slots `0 .. WAVES-2` stand for waves still moving through the stage's
  unregistered logic. They advance every cycle. They are a simulation device, not registers of
  the circuit.
* **Stage register.** The last slot is the stage's real edge-triggered register. It loads only
  when a wave arrives, because only then does a delayed clock edge arrive with it.

So with the default 3/2/3:

* A result appears in register 4 exactly **8 cycles** after register 1 took the operands, which
  is 9 cycles after they are presented at the ports.
* One addition can be accepted **every cycle**.
* Up to **8 waves** are in flight at once. `waves_in_flight` reports the count.

All logic sits *before* the flight slots of its stage. This gives the right values at the right
cycle. A synthesis tool, however, will build the flight slots as real flip-flops. To build the
circuit as a true wave pipeline, replace each `wave_stage_reg` by the stage register alone, and
close timing with multi-cycle constraints of `WAVES_Sk` periods.

**Clock gating.** `in_valid` low means "the input clock is gated off for this cycle". No wave is
launched, but the waves already in flight keep going, because their clock edges were already
launched. They reach register 4 without any flushing. A register that receives no wave holds
its value, so after the pipe drains, `sum` and `cout` keep showing the last result.
`out_valid` marks the cycles with a new result.

**Reset.** `rst_n` (asynchronous, active low) clears only the valid bits. Data registers are
not reset.

### `hwp_adder` interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; async reset of the valid bits |
| `in_valid` | in | 1 | launch a wave with `a`, `b` at this edge |
| `a`, `b` | in | 32 | addends |
| `out_valid` | out | 1 | `sum`/`cout` were updated by this edge |
| `sum`, `cout` | out | 32, 1 | result and carry out of bit 31 |
| `waves_in_flight` | out | 4 | waves between register 1 (included) and register 4 |

Parameters: `WIDTH` (32; a power of two ≥ 16 keeps every stage non-empty), `WAVES_S1/S2/S3`
(3/2/3, each ≥ 1), `S1_LAST_LEVEL` (2) and `S2_LAST_LEVEL` (3). Setting all three `WAVES_Sk`
to 1 gives the same adder clocked without clock delays. That is an ordinary three-stage
pipeline, one wave per stage, with a latency of 3 cycles.

## The carry-prediction lookahead adder

Each `cla4_pred_block` has three layers:

* **Generate/propagate:** g = a & b, p = a ^ b.
* **Carries:** two-level lookahead carries c0, c1, c2 from the block's carry in.
* **Sum:** s[i] = p[i] ^ c[i-1].

The block never computes its fourth carry. The carry it passes on is chosen by a multiplexer:

* **Predicted carry.** `carry_predictor` evaluates, from the upper three bit pairs only,

      cpred = a3 b3 + a2 b2 (a3 + b3) + a1 b1 (a2 + b2)(a3 + b3)

  This is the correct carry out whenever one of bits 1–3 generates or kills the carry. Those
  bits then decide the carry regardless of what enters bit 1. That holds for 56 of the 64
  patterns.
* **Fallback: c0.** In the other 8 patterns, p1 = p2 = p3 = 1. Then g1 = g2 = g3 = 0, and the
  fourth carry reduces to g0 + p0·cin, which is exactly c0. So the block passes on its *first*
  carry, which is the cheapest and earliest one to compute.
* **Select.** The select signal `pred_ok` is NAND(p1, p2, p3).

A block whose carry in was predicted starts at once. Only a chain of non-predicting blocks
ripples, and even then it ripples through first carries. With uniform random operands a block
predicts 87.5 % of the time.

`cla16_pred` chains four blocks between an input register and an output register, both on
`clk`. Operands presented before edge *k* give `sum`/`cout` after edge *k + 1*. `pred_ok[j]`
shows whether block *j* predicted, registered with the result. `WIDTH` must be a multiple of 4.

## Files

| file | contents |
|------|----------|
| `rtl/hwp_pkg.sv` | cell kinds, default sizes, the cell-placement functions |
| `rtl/hwp_top.sv` | both adders side by side (`pa_*` and `cla_*` ports) |
| `rtl/hwp_adder.sv` | three-stage hybrid wave-pipelined adder |
| `rtl/wave_stage_reg.sv` | cycle model of a stage holding several waves, and its register |
| `rtl/gp_generator.sv`, `rtl/carry_block.sv`, `rtl/sum_generator.sv` | the three adder blocks |
| `rtl/prefix_cell.sv`, `rtl/biased_nand2.sv`, `rtl/balanced_xor2.sv` | cells and gates |
| `rtl/cla16_pred.sv`, `rtl/cla4_pred_block.sv`, `rtl/carry_predictor.sv` | the prediction adder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cla_prediction_rate.sv` | measures the prediction rate on 20000 random additions |

## Simulating

Every testbench checks against integer addition or against the defining equations, and has a
watchdog. Each prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
          rtl/hwp_pkg.sv tb/tb_hwp_top.sv --top tb_hwp_top
./obj_dir/Vtb_hwp_top
```

Replace `tb_hwp_top` by any other testbench name.

`tb_hwp_top` runs both adders end to end at their default sizes, in well under a second. It
checks:

* every result and its exact latency;
* the pipe full with 8 waves;
* a gated input clock with the pipe draining by itself;
* sparse operations;
* for the lookahead adder: all blocks predicting, no block predicting, and one block failing
  between predicting ones.

It counts each of these events and fails if one never happened.

Coverage of the other testbenches:

* `tb_hwp_adder` also runs a one-wave-per-stage instance on the same stream, with a latency
  of 3.
* The carry tree is checked bit by bit against the carries of a + b, both whole and cut at the
  stage boundaries.
* The predictor is checked exhaustively over its 64 patterns, against an explicit table of the
  8 non-predicting ones.
* A 4-bit block is checked exhaustively over its 512 (a, b, cin) cases.

## What is modelled and what is not

* **Delays.** Biased NAND gates, balanced XORs and padding cells appear only as logic. Their
  purpose is pattern-independent, equalised delay, and that is a transistor-level property.
  Timing figures such as clock period, per-stage delays and power cannot be checked with this
  RTL.
* **Delayed clocks.** The per-stage clock delays, built in silicon as matched inverter trees
  with fan-out 2, are not in the RTL. Their effect is the wave latency of `wave_stage_reg`.
  The RTL has one clock. In silicon the output register's clock is not aligned with the input
  clock, but only the cycle count is visible here.
* **Registers.** All registers are rising-edge flip-flops. Edge-triggered registers needing a
  single clock phase were found to work best in this scheme.
* **Design choices.** Three things are choices of this design:
  * the stage split inside the carry tree;
  * the mapping of "waves per stage" to cycle latency;
  * the reading of the cells' f signal as the column's propagate bit carried to the sum stage.

  Each is set out above, and the first two are parameters.
* **Not included.** These appear in the study only as baselines, and are not included: a
  ripple-carry adder, a lookahead adder without prediction, and a purely wave-pipelined adder
  with no internal registers. A conventionally pipelined version of the adder needs no separate
  design: set `WAVES_S1/S2/S3` to 1.
