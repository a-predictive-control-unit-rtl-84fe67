# Predictive SAR control unit for a 10-bit time-domain SAR ADC

A successive-approximation (SAR) ADC normally spends one clock cycle per bit. It
compares the held input `Vin` with a DAC voltage `Vref`, keeps or drops the trial
bit, and moves on to the next one. In the converter this control unit was designed
for, the comparison is made in the time domain. `Vin` and `Vref` become two pulse
widths, a time amplifier stretches their difference, an arbiter reports which
pulse came first, and a counter measures how far apart they were. Knowing *how
far* `Vin` is from `Vref`, and not just which one is larger, says how many of the
following bits equal the current one. When the current bit starts a run of three
or more equal bits, the whole run is written in one cycle and the conversion
jumps past it.

This repository holds the digital part, the predictive SAR (PSAR) control unit,
as synthesizable SystemVerilog:

* a 10-bit result;
* 13 cycles for a conversion with no run to predict: Idle, ModeSelect, ten
  single-bit steps, EOC;
* one cycle for each predicted run of 3 to 9 bits.

Over an ascending ramp of all 1024 codes it needs 10 496 cycles, against 13 312
when every bit gets its own step. That is 21.2 % fewer cycles on average.

## A conversion, step by step

The register `pb` drives the DAC. At every step it holds:

* the resolved bits above the current index `q`;
* a trial `1` at bit `q`;
* zeros below bit `q`.

So `Vref = pb` (in LSB). The front end answers with `din = (Vin >= Vref)` and
`cnt = |Vin - Vref|`.

| cycle | state       | what happens |
|-------|-------------|--------------|
| 1     | Idle        | `start` seen; `rst_dac` low; `pb <= 10'b1000000000`; `q <= 9` |
| 2     | ModeSelect  | nothing is written; the MSB comparison settles |
| 3 ... | Normal/Predic | one step per cycle, see below |
| last  | EOC         | `eoc` high, `pb` holds the result; `q` is preset to 9 on the following edge |

A **single-bit step** at index `q` writes `pb[q] = din` and puts the next trial
bit at `pb[q-1]`. The index then counts down by one.

A **predictive step** at index `q` resolves `d >= 3` bits at once:

* bits `q .. q-d+1` become `din`;
* the trial bit goes to `q-d`;
* the index is loaded with `q-d`.

The last bit, at index 0, is always resolved by a single-bit step. When the
index is 0 the controller goes to EOC.

Two examples:

* **Code 511 (`0111111111`), 6 cycles.** Idle and ModeSelect come first. At
  `q = 9` a single-bit step gives `pb = 0100000000`. At `q = 8` a predictive
  step with `d = 8` gives `pb = 0111111111`, and the index becomes 0. A
  single-bit step then resolves bit 0, followed by EOC.
* **Code 341 (`0101010101`), 13 cycles.** It never has a run, so every bit gets
  its own step.
* **Code 412 (`0110011100`), 11 cycles.** Its run `111` at bits 4..2 is
  predicted in one cycle. If the front end reports no usable difference, it
  takes 13 cycles like any other code.

## The prediction rule (`psar_combi_cntr`)

This is the part of the design that takes some thought. At index `q`, write
`prefix` for the resolved upper bits, so `Vref = prefix + 2^q`. Because `Vin`
lies in `[prefix, prefix + 2^(q+1))`, the low `q` bits of `Vin` follow exactly
from `din` and `cnt`:

* `din = 1`: `Vin - Vref = cnt`, so bits `q-1..0` of `Vin` are the bits of `cnt`.
* `din = 0`: `Vin - prefix = 2^q - cnt`, which is the bitwise complement of
  `cnt - 1` on `q` bits.

The run of bits below `q` that equal `din` therefore has length `k`:

* for `din = 1`, `k` is the number of leading ones of `cnt` (from bit `q-1` down);
* for `din = 0`, `k` is the number of leading ones of `cnt - 1`.

The block outputs `dif_cnt = min(k + 1, q)`, and 1 when `q = 0`. The cap at `q`
keeps the last bit for a real comparison. A 4-bit comparator tests
`dif_cnt >= 3` to decide whether the step is predictive. A 4-bit subtractor
forms `q - dif_cnt` and raises `neg_flag` on a borrow. The unit jumps only when
`agtb` is high and `neg_flag` is low.

With an ideal front end, the result is exact and no comparison is skipped.
Because the prediction follows from the measurement itself, a predicted run is
correct as long as `cnt` is accurate to the LSB. A real time-domain front end
with coarser resolution would need a more conservative rule in this block. The
rest of the unit would stay the same.

## Blocks

| module | role |
|--------|------|
| `psar_pkg` | widths (10-bit result, 4-bit index, 10-bit `cnt`), threshold 3, state type |
| `psar_combi_cntr` | prediction rule above |
| `psar_comparator` | `agtb = (a >= b)`, with `b` tied to 3 |
| `psar_subtract` | next index `a_b = q - dif_cnt`, borrow as `neg_flag` |
| `psar_index_counter` | index `q`. Priority: preset to 9 > load `a_b` > count down (holds at 0). Also gives `zero_flag` |
| `psar_filler` | `pb` with bits `q..a_b+1` set to `din` and a trial 1 at `a_b` |
| `psar_pbr` | the register. Priority: `set_msb` > load the filler word > single-bit step |
| `psar_fsm` | Mealy controller: Idle, ModeSelect, Normal, Predic, EOC |
| `psar_top` | wires the above together |

In the two step states, `enb_pb` and `enable_index` are high. The counter load
and the filler load follow `jump` in the same cycle, so Normal and Predic drive
identical outputs. The state only records whether the last step was predictive.
From either one, `zero_flag` leads to EOC, `jump` to Predic, and otherwise to
Normal. `correct_index` is low in every state and unused.

Synthesized, the unit holds 19 flip-flop bits: 10 in the register, 4 in the
index and 5 in the one-hot state.

## Interface and timing

`psar_top` ports:

* `clk` (200 kHz in the intended system);
* `rst_n`: active low and asynchronous. It aborts a conversion, clears `pb` and
  returns to Idle;
* `start`;
* `din` and `cnt[9:0]`, from the front end;
* `pb[9:0]`, to the DAC and as the result;
* `rst_dac`: active low, low while Idle;
* `eoc`: high for one cycle with the result on `pb`;
* `index_cnt[3:0]` and `enb_pb`, for observation.

`din` and `cnt` are used combinationally in the cycle in which `pb` has the
matching value. So the DAC, the time-domain comparison and the count must all
settle within one clock period after `pb` changes. Holding `start` high gives
back-to-back conversions: EOC is followed by Idle, which sees `start` again.

## How this relates to the original description

These parts follow the source design:

* the block structure;
* the port names;
* the widths;
* the comparator constant 3;
* the counter preset and its downward count;
* the states, transitions and per-state output values;
* the 13-cycle standard conversion;
* the 6-cycle conversion of code 511.

Filled in or changed here:

* **Prediction rule.** The original names the counter decoder and its ports
  but gives no formula. The rule above is this design's. It needs `din` as an
  extra input, and it assumes that `cnt` is `|Vin - Vref|` in LSB. That
  assumption fits the original's stated range of 1..512 for this bus.
* **`jump`.** It is formed as `agtb & ~neg_flag`. The original calls it an OR
  of the zero flag and `agtb`, and also says that a negative subtraction blocks
  prediction. The OR would force a filler load at index 0, so the second
  statement was followed.
* **Counter preset.** It is driven by `set_msb | eoc`, which gives 9 at the
  start and at the end of each conversion. The original controller has no
  preset output.
* **When the index returns to 9.** Here the index is back at 9 on the edge that
  leaves EOC, and it still reads 0 during the EOC cycle. The original
  simulation trace shows it at 9 already during EOC. The result and the cycle
  count are the same either way.
* **Filler bit range.** The filler fills bits `q..a_b+1` and sets the trial bit
  at `a_b`. The original leaves the exact range open.
* **Implementation choices.** The following are not specified in the original:
  * the asynchronous reset;
  * the priorities inside the register and the counter;
  * the counter holding at zero;
  * the state encoding.
* **Unbuilt parts.** The original's RTL view has an index multiplexer driven by
  `correct_index`. It is not built, because that signal is low in every state.

The following parts of the full ADC are not included, because they are analog
or not specified: sample-and-hold, the two voltage-to-time converters, the time
amplifier, the arbiter, the difference counter, the capacitive DAC and the clock
divider. The top-level testbench replaces them with an ideal integer model.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_psar_comparator`, `tb_psar_subtract`: exhaustive over all 4-bit pairs.
* `tb_psar_combi_cntr`: every code 0..1023 at every index 0..9. The expected
  count comes from the bits of the code directly, not from `cnt`.
* `tb_psar_index_counter`, `tb_psar_pbr`: random stimulus against a reference
  model, plus a full count-down and an asynchronous reset.
* `tb_psar_fsm`: the state table checked every cycle, a 13-cycle standard
  conversion, random inputs and a reset.
* `tb_psar_top`: the whole unit at its default sizes with an ideal front end.
  It checks:
  * all 1024 codes, each for the correct result and the exact cycle count;
  * codes 412, 341 and 511 by number;
  * predictive steps of every length from 3 to 9 bits, and no other length;
  * a reset during a conversion, and idle cycles.

  It counts single-bit steps, predictive steps and the ModeSelect→Predic,
  Normal→Predic, Predic→Predic and Predic→Normal transitions, and fails if
  any of them never occurs. It also prints the ramp's total cycle count.

`psar_top` also contains an assertion: a predictive step never moves the index
up or below zero.

To run a testbench with Verilator:

    verilator --binary --timing --assert -y rtl rtl/psar_pkg.sv tb/tb_psar_top.sv \
              --top-module tb_psar_top -o sim && ./obj_dir/sim

Replace `tb_psar_top` with any other testbench name. Each run takes well under
a second.
