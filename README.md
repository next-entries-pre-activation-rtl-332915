# Drowsy branch target buffer with next-entry pre-activation

A branch target buffer (BTB) is one of the largest SRAM arrays in a processor core, and most of its
rows go unused for long stretches. Each row can be put into a *drowsy* mode: its supply is lowered
so that it leaks far less but still keeps its contents. It cannot be read in that mode, and bringing
it back to full supply takes a cycle. If a fetch hits a sleeping row, the front end stalls.

This RTL hides that wake-up cycle by remembering the order in which branches are met. Next to the BTB
sits a **Next BTB Entry Table (NBET)** with one row per BTB entry. The NBET row of branch *I* records
where in the BTB (set and way) the next branch after *I* lives. When *I* hits in the BTB, its NBET row
is read and that next row is woken ahead of time. Since the wake-up is mostly hidden, a row can be
put to sleep after only a short idle time. The decay interval is 128 cycles by default. Earlier decay
schemes for branch predictors, which discard the contents, waited on the order of 64K cycles.

The design follows the pre-activation scheme published as "Next Entries Pre-activation for Low
Power Drowsy BTB" (master's thesis, National Chiao Tung University, 2006). It has the geometry of that evaluation: 512 entries, 4-way set
associative, a bimodal (2-bit) direction predictor in each entry, and a one-cycle wake-up. Where that
description leaves a detail open, the choice made here is stated below and in the opening comment
of each file.

## Structure

```
drowsy_btb_top
 ├─ drowsy_btb            tag/target/predictor arrays, lookup, update, replacement
 │   ├─ way_encoder (x2)  tag-match vector -> way number (lookup and update paths)
 │   ├─ bimodal_predictor 2-bit predictor next state, "prediction changed" flag
 │   └─ power_mode_ctrl   per-row ACTIVE / DROWSY / WAKING state, wake-up latency
 ├─ location_register     LR: {set, way, DIR} of the last branch written
 ├─ nbet_one_dir          NBET, one field per row           (ONE_DIR = 1, default)
 │  or nbet_two_dir       NBET, Taken + Non-taken fields    (ONE_DIR = 0)
 ├─ preact_circuit        decodes the pre-activation register(s) into one line per row
 ├─ decay_ctrl            global counter + per-row local counters -> deactivation
 └─ deact_gate            never deactivates the row held in LR
btb_pkg                   predictor-state and power-mode enums
```

A BTB location is the row index `{set, way}` = `set * WAYS + way` (9 bits by default). The BTB, the
NBET and all per-row vectors use it. NBET rows have no power control of their own: each shares the
mode of its BTB row.

## Learning the branch order: the write path

The NBET is filled in the execute stage. A resolved branch is *written* into the BTB when it is taken
or is already present. A not-taken branch that is not in the BTB is ignored. Each time a branch is
written:

1. The location register (LR) still holds the location of the previous branch written. The NBET row
   at that location receives the location of the current branch.
2. The LR is then loaded with the current branch's location and a DIR bit.

The two policies differ in the DIR bit and in which field is written:

* **Two-direction** (`ONE_DIR = 0`). DIR is the resolved direction of the branch. The NBET row has a
  Taken field and a Non-taken field, and the previous branch's DIR selects the field. Both
  successors of a branch are learned. Each hit wakes up to two rows, one of which is not needed.
* **One-direction** (`ONE_DIR = 1`, default). The row has a single field, meant to hold the
  successor along the direction the predictor currently predicts. The DIR bit is a *Change* flag.
  It is set when the branch was just inserted (new branches start weakly taken, so the taken path is
  learned first). It is also set when the update flipped the predicted direction. The NBET row is
  written only if the previous branch's Change flag is set. The predictor moves from a weak state
  straight to the opposite strong state (WT→SNT, WNT→ST), so a flip happens exactly on those two
  transitions. This halves the NBET. The cost is that a misprediction also wakes the wrong row.

When a taken branch is inserted into a BTB entry, that entry's NBET row is cleared, because it
described the evicted branch. Rows of other branches that still point at the replaced entry are kept
and keep being used. Such a stale pointer wakes a row for nothing, which costs only energy.

## Using it: the lookup path and its timing

```
cycle t     fetch looks up PC; hit on BTB row I (combinational)  -> BTB location register
cycle t+1   NBET row I is read                                    -> pre-activation register(s)
cycle t+2   preact_o[next] = 1; power_mode_ctrl starts waking the row
cycle t+3   the next row is ACTIVE (with WAKE_LAT = 1)
```

If the next branch is fetched at t+3 or later, it finds its row awake. Back-to-back branches closer
than that still stall, as does any branch whose NBET information is missing or wrong. Wrong or
missing information comes from a first pass through a loop, a return that goes somewhere other than
last time, an evicted entry, or a one-direction misprediction.

A lookup that matches the tag of a row that is not ACTIVE does not report a hit. It raises `stall_o`
and wakes the row on demand; fetch holds the PC and retries. The tag compare is done even on a
sleeping row, since its contents are kept. A tag miss wakes nothing. An execute-stage write to a
sleeping row also wakes it but is not delayed. This RTL assumes such a write is buffered off the
critical path.

## Putting rows to sleep: decay and the LR gate

`decay_ctrl` has a global counter that ticks every `GLOBAL_INTERVAL` cycles (default
`DECAY_INTERVAL / 4` = 32). It also has one 3-bit local counter per row. A row's counter is cleared
whenever the row is touched: looked up, written, woken or pre-activated. Otherwise it advances on
every tick and saturates at 4. At 4 the row's deactivation request is high, so an idle row falls
asleep 97 to 128 cycles after its last touch. Clearing the counter on pre-activation is this
design's choice. Without it, a pre-activated row whose counter is already saturated would go back
to sleep at once.

With such a short interval, a long basic block could put to sleep the NBET row that the *next*
branch update has to write, namely the row named in LR. `deact_gate` masks the deactivation of that
one row.

`power_mode_ctrl` gives a wake request (pre-activation or on-demand) priority over a deactivation in
the same cycle, and a row that is waking ignores deactivation. After reset every row is ACTIVE and
every BTB and NBET valid bit is clear.

## Parameters (drowsy_btb_top)

| parameter | default | meaning |
|---|---|---|
| `ONE_DIR` | 1 | 1: one-direction NBET, 0: two-direction NBET |
| `SETS`, `WAYS` | 128, 4 | BTB geometry (512 entries); powers of two, `WAYS` ≥ 2 |
| `ADDR_W`, `OFFSET_W` | 32, 2 | address width, byte-offset bits dropped from the PC |
| `WAKE_LAT` | 1 | cycles from wake request to ACTIVE |
| `DECAY_INTERVAL` | 128 | maximum idle time before a row sleeps |
| `GLOBAL_INTERVAL` | `DECAY_INTERVAL/4` | period of the global decay tick |

The PC is split as tag | set index | offset. Each entry stores a valid bit, a 23-bit tag, a full
32-bit target and 2 predictor bits. Victims are chosen as the lowest invalid way, then by a per-set
round-robin pointer. The 32-bit address, the full target, the replacement policy, the counter sizes
and the state encodings are this design's own choices.

Synthesised at the defaults (generic yosys cells), the top comes to about 16.8k word-level cells,
5.4k flip-flop bits and 32 kbit of memory arrays (BTB and NBET storage).

## Ports (drowsy_btb_top)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `lookup_en_i`, `lookup_pc_i` | in | 1, `ADDR_W` | fetch-stage lookup |
| `hit_o`, `pred_taken_o`, `target_o` | out | 1, 1, `ADDR_W` | prediction, same cycle |
| `stall_o` | out | 1 | matched a sleeping row: hold the PC and retry |
| `upd_valid_i`, `upd_pc_i`, `upd_taken_i`, `upd_target_i` | in | | resolved branch (execute stage) |
| `active_o`, `drowsy_o` | out | `SETS*WAYS` | power state of each row |
| `preact_o`, `deact_o`, `wake_start_o` | out | `SETS*WAYS` | pre-activation, gated deactivation, wake-up start per row |

The last five vectors exist for observation and energy accounting. Leave them open if not needed.

## What is not in the RTL

* The analog part: the pair of supply transistors per row that switches between the full (1 V) and
  the drowsy (300 mV) supply. Here it is reduced to the per-row mode state in `power_mode_ctrl`.
  That state stands for the drowsy bit that would drive those transistors.
* Energy itself. The testbenches estimate BTB leakage with 0.33 pJ/cycle per active row, 0.0495
  pJ/cycle per drowsy row and 11 pJ per wake-up (the per-entry figures used in the original
  evaluation). Only wake-ups are charged the transition energy; how mode changes were charged
  originally is not known. The estimate covers the BTB rows only. It leaves out the NBET's own
  leakage, the dynamic energy of the NBET and decay counters, and the extra leakage of the whole
  core during stall cycles. The testbenches count those stall cycles separately.
* The processor. The testbenches drive the BTB from a behavioural fetch/execute model
  (`tb/btb_program_driver.sv`), not from a real core, and use a synthetic program instead of the
  MiBench and SPEC2000 benchmarks of the original evaluation.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_drowsy_btb_full \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/btb_pkg.sv tb/tb_drowsy_btb_full.sv
./obj_dir/Vtb_drowsy_btb_full
```

| testbench | what it runs |
|---|---|
| `tb_drowsy_btb_full` | the top at its defaults, 60 000 cycles of the synthetic program |
| `tb_drowsy_btb_top` | the full-size top with both policies side by side. It fails if any mechanism never happens: decay, pre-activation of a drowsy row, on-demand stall, LR gating, NBET write and clear, replacement, direction change, both pre-activation registers in use |
| `tb_decay_sweep` | decay intervals 32 … 2048, reporting stalls and relative leakage |
| `tb_drowsy_btb` | small BTB against a reference model, every output every cycle |
| `tb_nbet_one_dir`, `tb_nbet_two_dir` | NBET write/clear/lookup timing against a reference table |
| `tb_power_mode_ctrl`, `tb_decay_ctrl` | wake-up latency 1 and 3; decay timing window and tick period |
| `tb_bimodal_predictor`, `tb_way_encoder`, `tb_deact_gate`, `tb_preact_circuit`, `tb_location_register` | exhaustive or random unit checks |

The synthetic program (`btb_program_driver`) contains an alternating if/else, an 8-iteration inner
loop, a data-dependent branch, two calls to one subroutine (the return is an indirect jump), a
detour through five jumps that share one BTB set (forcing replacements), and a 200-instruction
straight block that outlasts the decay interval. On it, the default configuration stalls on about 1%
of lookups, or roughly one stall for every five hits. Leakage comes to about 16% of an always-active BTB. This
figure is dominated by the many rows the small program never uses, so it says little about real
programs.

Both policies, on 29 000 cycles each (`tb_drowsy_btb_top`):

| policy | hits | wake-up stalls | drowsy rows pre-activated | leakage vs. always active |
|---|---|---|---|---|
| one-direction | 1662 | 311 | 514 | 0.163 |
| two-direction | 1669 | 217 | 716 | 0.164 |

The two-direction table hides more wake-ups. It pays for that by waking more rows and by needing
twice the NBET storage, which this estimate does not charge.

Decay sweep, one-direction, 40 000 cycles each (`tb_decay_sweep`):

| decay interval | 32 | 64 | 128 | 256 | 512 | 1024 | 2048 |
|---|---|---|---|---|---|---|---|
| stalls per 100 lookups | 1.08 | 1.08 | 1.08 | 0.79 | 0 | 0 | 0 |
| leakage vs. always active | 0.156 | 0.158 | 0.162 | 0.169 | 0.175 | 0.187 | 0.211 |

On this program, the gaps between branches are either short or a few hundred cycles long (the
straight block), so stalls stay flat up to 128 and disappear once the interval outlasts the block.
Real code has a wider spread of gaps.

## How far to trust it

Each block has a self-checking testbench. Each testbench was also shown to fail on a deliberately
broken copy of its block. The reference models in the testbenches are written from the behaviour
described above, not from the RTL, but they share its assumptions: replacement policy, state
encoding, the priority rules in `power_mode_ctrl` and the counter sizes in `decay_ctrl`. The
points where this design fills in unspecified behaviour are:

* the pipeline handshake (`stall_o`, retry) and the rule that execute-stage writes are not delayed
  by a sleeping row;
* clearing an NBET row when its BTB entry is reallocated;
* decay counters being cleared by pre-activation, the counter width and the global interval;
* the one-direction Change flag counting a new insertion as a change. This is how the taken path of
  a new branch gets learned. Otherwise a row is rewritten only on a predicted-direction flip, so an
  NBET row that missed its first chance stays empty until the prediction flips;
* pre-activation registers being reloaded every cycle, so `preact_o` is a one-cycle pulse.
