# Drowsy BTB with next-entry pre-activation

A branch target buffer (BTB) is a large on-chip SRAM that is looked up every
cycle, yet at any moment a program uses only a few of its entries. This design
saves leakage by keeping each BTB entry in one of two power modes:

- **normal**: the entry can be read;
- **drowsy**: the entry keeps its contents at a lower supply voltage, but must
  be woken (one cycle) before it can be read.

Two mechanisms manage the modes:

1. **Decay (deactivation).** An entry that has not been accessed for a *decay
   interval* (128 cycles by default) is put to sleep.
2. **Next-entry pre-activation.** For every branch in the BTB, a side table
   (the *Next BTB Entry Table*, NBET) remembers where in the BTB the next branch
   along its predicted path lives. When a branch hits in the BTB, that next
   entry is woken in advance, so the wake-up cycle is normally hidden.

Because the next entry is woken just in time, the decay interval can be short
(hundreds of cycles rather than thousands), and most of the BTB sleeps most of
the time. The default configuration is the *one-direction* scheme: each NBET
entry holds a single next location, the one along the branch's currently
predicted direction. A parameter selects instead the *two-direction* scheme or
a decay-only BTB without pre-activation, for comparison. The design follows a published drowsy-BTB scheme. Its
sizes come from that scheme's evaluated processor: a 512-entry, 4-way BTB with
a bimodal predictor in the BTB, and a 128-cycle decay interval. Where that
description stops, this design makes its own choices. They are listed in
[Own choices and departures](#own-choices-and-departures).

## Block structure

```
                 lk_pc ──► drowsy_btb ──► lk_hit / lk_stall / lk_taken / lk_target
                 up_*  ──►  (tags, targets, predictor, power_mode_ctrl)
                              │   ▲ pre_act        ▲ deact
              lk_hit, lk_idx  │   │                │
                              ▼   │                │
                        nbet_lookup ──► preact_decoder      deact_gate ◄── decay_ctrl
                              │ read                          ▲ LR           ▲ access
                              ▼                               │              │
            up_idx, up_changed, up_alloc ──► loc_collect ──► nbet (write)    │
                                                                             │
                          (lookup hits, update writes, pre-activations) ─────┘
```

| Module | Role |
|---|---|
| `drowsy_btb` | 512 × {valid, tag, target, 2-bit predictor state}, 4-way. Lookup and update ports. It contains the per-entry mode register. |
| `power_mode_ctrl` | One awake bit per entry. A wake request in cycle *t* makes the entry readable in *t*+1. |
| `bimodal_counter` | Predictor next-state function and the "predicted direction changed" flag. |
| `decay_ctrl` | Global tick counter and a 2-bit local counter per entry. Produces the deactivation signals. |
| `deact_gate` | Blocks the deactivation of the entry held in the Location Register. |
| `loc_collect` | Location Register (LR) and DIR bit. Generates the NBET writes. |
| `nbet` | 512 × {valid, 9-bit BTB location}, one field per entry (two in the two-direction variant). Independent write port, read port and invalidate port. |
| `nbet_lookup` | BTB location register and pre-activation register(s). |
| `preact_decoder` | Turns the pre-activation register(s) into one wake signal per entry. |
| `drowsy_btb_top` | Wires all of the above together. In the decay-only build it leaves out `loc_collect`, `nbet`, `nbet_lookup` and `preact_decoder`. |
| `btb_pkg` | Shared defaults, the predictor state type and the event struct. |

A BTB *location* is the flat entry index `{set, way}`: 7 set bits and 2 way
bits. The NBET has one entry per BTB entry, at the same index, and shares that
entry's power mode.

## What the NBET records, and when

The subtle part of the design is filling the NBET. A branch's successor is not
known when the branch resolves. It is known only when the *next* branch
resolves. So the collection logic works one branch behind:

- `LR` holds the BTB location of the last resolved branch that is in the BTB.
- `DIR` records whether the NBET entry of that branch needs rewriting.
- When the next BTB-resident branch resolves at location `L`:
  - if `DIR` is set, `NBET[LR] <= L` and the entry becomes valid;
  - then `LR <= L`, and `DIR` is set if this branch's predicted direction
    changed or the branch was just allocated.

A one-field NBET entry should point along the branch's *predicted* direction.
It therefore only needs rewriting when the prediction flips. With this
predictor, a flip happens in exactly two transitions: WT→SNT and WNT→ST. The
states are SNT, WNT, WT and ST: strongly/weakly not-taken/taken.

| state | taken | not taken |
|---|---|---|
| ST  | ST  | WT  |
| WT  | ST  | **SNT** (flip) |
| WNT | **ST** (flip) | SNT |
| SNT | WNT | SNT |

In both flips the branch actually went the newly predicted way. The branch
that resolves next is therefore the right successor to record. A taken branch
enters the BTB in WT. Its first successor, along the taken path, is recorded
because an allocation also sets `DIR`.

Consequences worth knowing:

- Branches that are never taken are never allocated. They have no location, so
  they are skipped: LR keeps pointing at the previous BTB-resident branch.
- When a BTB entry is replaced, its NBET entry is invalidated. If a write to
  the same entry happens in the same cycle, the invalidation wins, because the
  write belonged to the evicted branch.
- The NBET write port is separate from the BTB update port. Both are written
  in the same cycle.

### Two-direction variant

Setting `NBET_FIELDS = 2` builds the other scheme of the same family. Each NBET
entry then holds two successors, one along the taken path and one along the
not-taken path. The changes are:

- `DIR` holds the resolved direction of the branch in LR and selects the field
  written (field 0 = taken, field 1 = not taken).
- The NBET is written for every BTB-resident branch.
- Both fields are read on a hit, and both successors are woken.

This variant wakes one entry too many on every branch, and its NBET is twice
the size. In return, a branch whose direction flips does not cost a wake-up.
The reported best decay interval for this variant is 64 cycles, against 128 for
the one-direction default.

### Decay-only configuration

Setting `NBET_FIELDS = 0` leaves out the NBET, the location collection, the
NBET lookup and the pre-activation decoder. What remains is a drowsy BTB
managed by decay alone, the baseline the scheme is measured against. With no LR
there is nothing to guard, so `deact_gate` passes every deactivation through.
Every first access to a drowsy entry costs a wake-up stall.

## Pre-activation timing

| cycle | event |
|---|---|
| *t* | Lookup hits branch A (entry awake). A's location is latched in the BTB location register. |
| *t*+1 | `NBET[A]` is read. Each valid field is latched in its pre-activation register. |
| *t*+2 | `preact_decoder` raises the wake signal of A's successor B. |
| *t*+3 | B is readable. |

If the front end reaches B in *t*+3 or later, no wake-up cycle is visible. If
B is reached earlier, or the NBET had no (or a wrong) successor, the lookup of
B finds a drowsy entry. `lk_stall` is then raised, B is woken, and the same
lookup hits one cycle later. Only an awake hit starts an NBET lookup.

## Decay and the LR guard

`decay_ctrl` ticks every `DECAY_INTERVAL / 2^LOCAL_BITS` cycles (32 by
default). Each entry's local counter:

- is cleared when the entry is hit, written or pre-activated;
- counts ticks, saturating at 3.

A tick that finds a saturated counter deactivates the entry. An entry left
alone therefore goes drowsy between 96 and 128 cycles after its last access.
An access in the same cycle as a tick wins.

There is one exception. The entry held in LR is still waiting for its NBET
write, and a long basic block may follow it. `deact_gate` masks that entry's
deactivation, so the NBET write always goes to an awake entry. The top checks
this with an assertion.

## Choosing the decay interval

A short interval saves leakage on idle entries, but it also puts to sleep
entries that are about to be used again. Pre-activation can only rescue the
*next* branch, and only if the NBET knows it. A long interval avoids stalls
but keeps stale entries awake.

The testbench `tb_decay_sweep` runs a synthetic program on all three schemes.
The program is 16 successive loops of four branches each, 64 branches in all,
with a 60-cycle loop back-edge. It runs through twice, so each loop returns
after about 14,000 cycles. It produces:

| scheme | decay | stalls | performance loss | leakage vs. always-on BTB |
|---|---|---|---|---|
| decay only | 32 | 1280 | 4.58% | 0.158 |
| decay only | 128 | 96 | 0.34% | 0.157 |
| decay only | 2K | 64 | 0.23% | 0.170 |
| decay only | 8K | 64 | 0.23% | 0.203 |
| decay only | 32K | 0 | 0 | 0.231 |
| one-direction | 32 | 592 | 2.12% | 0.189 |
| one-direction | 128 | 64 | 0.23% | 0.186 |
| one-direction | 2K | 32 | 0.11% | 0.200 |
| one-direction | 32K | 0 | 0 | 0.273 |
| two-direction | 32 | 369 | 1.32% | 0.220 |
| two-direction | 128 | 1 | <0.01% | 0.215 |
| two-direction | 32K | 0 | 0 | 0.314 |

Performance loss is the stall cycles over the cycles the same program takes
with a BTB that never sleeps.

The run takes about 28,000 cycles. The leakage estimate counts normal and
drowsy entry-cycles and mode changes at 0.001289 pJ/bit/cycle, 0.0001934
pJ/bit/cycle and 0.043 pJ/bit respectively. It uses 56 BTB bits per entry plus
the NBET bits. The program touches only 64 of the 512 entries, so the
always-present NBET overhead weighs more than it would on real code. The
numbers show the shape of the trade-off, not the savings on real code, and
they leave out the energy of the stall cycles.

- **Stalls inside a loop.** At 32 cycles every loop iteration loses entries.
  Decay only pays for each of them. Pre-activation recovers about half
  (one-direction) or more (two-direction).
- **Stalls on a returning loop.** Between 128 and 8K cycles the only stalls are
  the first branches of each returning loop. Decay only stalls on all four
  branches of each loop, 64 in all. The one-direction scheme stalls on two, 32
  in all. The first is the loop entry, which the NBET of the previous loop's
  exit branch does not point to, because that branch's prediction did not
  change. The second is the successor of a branch whose prediction had flipped, so
its NBET field points the other way. The two-direction
  scheme knows both successors and stalls once in the whole run.
- **Decay only** needs the 32K interval to remove those stalls, and there its
  leakage is the highest of its curve. This is why the published best
  intervals are 8K for decay only, but 128 (one-direction) and 64
  (two-direction) with pre-activation.

## Interface of `drowsy_btb_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock and active-low synchronous reset. |
| `lk_valid`, `lk_pc` | in | 1, ADDR_W | Lookup request for the fetch PC (every cycle). |
| `lk_hit` | out | 1 | Hit on an awake entry. `lk_taken` and `lk_target` are valid. |
| `lk_stall` | out | 1 | Hit on a drowsy entry. Repeat the lookup next cycle. |
| `lk_taken`, `lk_target` | out | 1, ADDR_W | Predicted direction and target. |
| `up_valid`, `up_pc`, `up_taken`, `up_target` | in | | Resolved branch. Written at the clock edge. |
| `awake` | out | ENTRIES | Power mode per entry, for leakage accounting. |
| `events` | out | `btb_events_t` | One-cycle strobes: awake hit, wake stall, allocation, direction change, NBET write, NBET lookup, pre-activation, pre-activation wake-up, deactivation, LR guard active, global decay tick. |

Lookup is combinational within the cycle. The update is registered. Lookup and
update may be presented in the same cycle, even for the same branch. After
reset, all entries are invalid and drowsy, and all NBET entries are invalid.

Parameters (defaults from the evaluated configuration unless marked):

| Parameter | Default | Note |
|---|---|---|
| `ENTRIES` | 512 | BTB entries (and NBET entries). |
| `WAYS` | 4 | Associativity. |
| `DECAY_INTERVAL` | 128 | Cycles. The reported sweep spans 32 to 32K. Any power of two ≥ 2^LOCAL_BITS works. |
| `LOCAL_BITS` | 2 | Local decay counter width (own choice). |
| `NBET_FIELDS` | 1 | 1 = one-direction NBET (recommended), 2 = two-direction NBET, 0 = decay only (no NBET, for comparison). |
| `ADDR_W` | 32 | Address width (own choice). PCs are word aligned. |

## Own choices and departures

The scheme itself comes from the published description. The following points
are this design's own, because the description leaves them open:

- **Tags.** Tags are compared regardless of mode, and only a hit on a drowsy
  entry costs the wake-up cycle. A design whose tags also sleep would need to
  wake the whole set on every lookup.
- **Stall protocol.** `lk_stall` with a repeated lookup is this design's way of
  exposing the one-cycle wake-up. The front end must implement the repeat.
- **Updates.** Updates write and wake an entry without a stall.
- **Replacement.** First invalid way, otherwise round-robin per set.
- **Address format.** Full tags. The target is stored as a word address.
- **Pre-activation.** The pre-activation register is valid for one cycle only.
  A pre-activation also clears the entry's decay counter. Without that, a woken
  entry whose counter was already saturated would be put back to sleep at the
  next global tick, possibly before it is used.
- **Decay counters.** The exact firing point of the decay counter is this
  design's reading of "reaches its maximum value", as is the 2-bit width. So is
  the reset state: counters saturated, entries drowsy.
- **Two-direction writes.** In the two-direction variant, every NBET write
  overwrites the field, even when it already holds the same location.
- **Analog part.** The drowsy SRAM row (dual supply voltage) is analog. It
  appears only as the awake bit and the one-cycle wake latency.
- **Energy.** Leakage and energy accounting is left to the user. The `awake`
  vector and the event strobes carry what is needed.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_bimodal_counter` | All eight state/direction cases against the transition table above. |
| `tb_power_mode_ctrl` | Reset state, one-cycle wake, and random wake/deactivate against a reference. |
| `tb_drowsy_btb` | 16-entry, 4-way instance with random lookups and updates over 24 PCs. It compares hit/stall, location, target, prediction, update flags, replacement, awake vector and access vector every cycle against a reference model. |
| `tb_decay_ctrl` | Tick period, deactivation against a "ticks since last access" reference, and a decay time within (12, 16] cycles for a 16-cycle interval. |
| `tb_deact_gate` | Random deactivation vectors and LR values. |
| `tb_nbet` | One-field and two-field tables. Random write, invalidate and read against a reference, including invalidate-over-write priority. |
| `tb_loc_collect` | One- and two-direction instances. Directed allocation and no-change cases, then random updates against a reference LR/DIR model. |
| `tb_nbet_lookup` | One- and two-field instances. Pre-activation register contents exactly two cycles after each hit, only for valid NBET fields. |
| `tb_preact_decoder` | One- and two-register decoders against a one-hot reference. |
| `tb_drowsy_btb_top` | Full design at default sizes (see below). |
| `tb_decay_sweep` | Eighteen instances (three schemes, decay 32 to 32K) running a 64-branch program twice through. It checks the stall and leakage trends, the stall ordering of the three schemes (see above), and that only the builds with an NBET pre-activate. Uses the helper `sweep_run`. |
| `tb_drowsy_btb_top_2dir` | The same program on the two-direction variant with a 64-cycle decay interval. It also checks both NBET fields and a double pre-activation. |

`tb_drowsy_btb_top` runs a five-branch loop for 50 iterations. The loop
includes gaps longer than the decay interval, a branch that is never taken, a
3-of-4 pattern, and a branch that switches from always-taken to never-taken
after 30 executions. It checks:

- targets and predictions;
- that a stalled lookup hits one cycle later;
- that the successor's location appears two cycles after a hit;
- that in the last 15 iterations only the branch reached after a long gap still
  stalls, so pre-activation hides every other wake-up;
- the final NBET contents;
- that after 300 idle cycles only the LR entry is awake.

It also counts each mechanism and fails if one never occurs.

To run a testbench with Verilator, from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/btb_pkg.sv \
          tb/tb_drowsy_btb_top.sv --top-module tb_drowsy_btb_top
./obj_dir/Vtb_drowsy_btb_top
```

The package is named first. `-y` lets Verilator find every other module by its
file name. Replace the testbench name to run another one. The full-size
end-to-end test and the sweep each run in a few seconds. Lint with
`verilator --lint-only -Wall -y rtl rtl/btb_pkg.sv rtl/drowsy_btb_top.sv`.
The remaining lint warnings are the unused low address bits (PCs are word
aligned) and package defaults that a given file does not use.
