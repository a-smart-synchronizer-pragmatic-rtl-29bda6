# Smart synchronizer: metastability modelling that respects Gray-coded buses

A flip-flop that samples an asynchronous signal near its edge may go
metastable and settle to either the old or the new value. Real silicon
therefore sometimes sees a transition one destination clock later than a
zero-delay RTL simulation does. A simulation that never shows this hides clock
domain crossing (CDC) bugs. One that shows it too eagerly reports failures that
cannot happen in silicon.

The common "aggressive" synchronizer model randomly delays *every* bit that
changed since the last destination edge. That breaks multi-bit crossings built
on Gray code. A Gray-coded FIFO pointer is safe to synchronize bit by bit
because only one bit changes per increment. So the far side always sees either
the new count or the old one. When the source clock is faster than the
destination clock, several increments, and so several different bits, can
change between two destination edges. The aggressive model then combines those
bits freely. The result can be a pointer value the source never held, and a
design that is in fact correct fails in simulation. Turning randomization off
instead makes the simulation blind to real hazards.

This repository holds a simulation model that sits between those two
extremes, plus a dual-clock FIFO that uses it. The model has two layers:

* **Basic layer (`smart_sync_bit`)**, one per bit. It makes a bit a
  *candidate* for uncertainty when the bit changed since the previous
  destination edge. A candidate bit may capture the value it had before its
  last change instead of the current value.
* **Filter layer (`smart_sync_filter`)**, one per vector. It watches the whole
  vector and marks only the bits that changed in the *most recent* update. A
  bit that changed earlier but then held still for a full source cycle was
  stable at the sampling flop long enough to be captured cleanly. The filter
  therefore vetoes its candidacy.

Together they randomize only what could really be uncertain. For a Gray
pointer the synchronized value is always the newest count or the one before
it. Successive samples can still jump by more counts than a designer might
expect, and the FIFO in this repository is built to handle such jumps.

## Files

| file | kind | what it is |
|---|---|---|
| `rtl/smart_sync_pkg.sv` | package | xorshift32 random step, per-bit seed mixing |
| `rtl/smart_sync_bit.sv` | simulation model | basic layer: one synchronizer bit with modelled metastability |
| `rtl/smart_sync_filter.sv` | simulation model | filter layer: marks the bits changed by the latest update |
| `rtl/smart_sync.sv` | simulation model | multi-bit smart synchronizer (filter plus one basic layer per bit) |
| `rtl/gray_ptr.sv` | RTL | binary counter with a registered Gray copy and a Gray look-ahead |
| `rtl/fifo_mem.sv` | RTL | FIFO storage: clocked write port, combinational read port |
| `rtl/async_fifo.sv` | RTL (top) | dual-clock FIFO whose Gray pointers cross through `smart_sync` |
| `tb/tb_*.sv` | testbenches | one self-checking testbench per module |

The three `smart_sync*` modules are **behavioural, simulation-only models**.
They observe input changes with event controls (`@(d)`), which infers the
source clock without being connected to it. In a netlist each one stands for
`STAGES` plain flip-flops per bit. To synthesize `async_fifo`, replace
`smart_sync` with a two-flop synchronizer that has the same ports, and tie the
event outputs to zero.

## How one bit decides

`smart_sync_bit` keeps three pieces of state about its input `d`:

* `curr_d`, the current value;
* `prev_d`, the value before the last change;
* a count of changes. The clocked side compares it with the count it saw at
  the previous edge. "The count has moved" means *changed since the last
  edge*, the candidacy flag.

At each rising edge of `ck` the first stage loads:

| changed since last edge | `transition_vld` | first stage loads |
|---|---|---|
| no | – | `curr_d` |
| yes | 0 (vetoed by the filter) | `curr_d` |
| yes | 1 | random: `prev_d` (late) or `curr_d` (early) |

The edge then clears the candidacy: a change before this sample is settled by
the next one. Stages 2 to `STAGES` are ordinary flops, so `q` follows a
certain capture after exactly `STAGES` edges. A late resolution adds one edge.
Tie `transition_vld` high and the bit behaves as the aggressive model.

Because `prev_d` is stored explicitly rather than taken as `~curr_d`, the rule
also carries unknown values through correctly on a four-state simulator.

**Random source.** Each bit owns a 32-bit xorshift generator seeded from the
`SEED` parameter; `smart_sync` derives a different seed for every bit. The
generator steps only when a random decision is actually due. The same seed
therefore gives the same run, and captures that are certain do not use up
random numbers. Change `SEED` on an instance to explore other resolutions.

## How the filter qualifies a vector

`smart_sync_filter` takes each change of its vector `d` as one source update.
On an update it sets `transition_vld = new ^ old` and holds it until the next
update. This relies on `d` coming straight from source-domain flops, so that
one source clock edge gives exactly one update. A vector built by
combinational logic can glitch through several values within one time step,
and each of those values would count as an update.

A worked case, with the write clock twice the read clock and a 3-bit Gray
write pointer advancing every write cycle:

| read edge | updates since the previous read edge | candidate bits (changed since last edge) | filter keeps | possible captures |
|---|---|---|---|---|
| 1 | 101→100→000 | bits 0 and 2 | bit 2 | 000 or 100 |
| 2 | 000→001→011 | bits 0 and 1 | bit 1 | 011 or 001 |
| 3 | 011→010→110 | bits 0 and 2 | bit 2 | 110 or 010 |

The aggressive model would also randomize the vetoed bit. At edge 2 that
allows 000, 001, 010 or 011. The value 010 (count 3) had not yet been written,
and a FIFO reading it would flag a false error. The smart synchronizer never
produces it. It can, however, produce 000, 001, 110, which is counts 0, 1 and
4. That is a jump of three counts in one read cycle, something a real
synchronizer can do. A design that assumed "at most two counts per cycle"
would fail, as it should. `tb_smart_sync` drives exactly this alignment and
checks that the sequence occurs.

## The dual-clock FIFO (`async_fifo`)

* Pointers are `PTR_W` = 3 bits: 2 address bits plus a wrap bit. The FIFO
  therefore holds 4 words of `DATA_W` = 8 bits.
* Each side has a `gray_ptr`: a binary register addresses the memory, and a
  Gray register crosses to the other side through a `smart_sync` (write
  pointer into `rclk`, read pointer into `wclk`).
* **Empty** is registered: the next read Gray pointer equals the synchronized
  write pointer.
* **Full** is registered: the next write Gray pointer equals the synchronized
  read pointer with its two top bits inverted.
* Each flag is exact on its own side and pessimistic about the other side,
  because the synchronized pointer lags. Lag of any size is safe, so the
  three-count jumps above cause no errors.
* Writes while full and reads while empty are ignored.
* The read port falls through: `rdata` shows the oldest word whenever
  `rempty` is low, and `rinc` pops it at the next `rclk` edge.
* Latency: a word written into an idle, empty FIFO makes `rempty` fall 3
  `rclk` edges after the write edge, or 4 if the pointer bit resolves late.
* Two assertions check the main safety rule. Neither side ever believes the
  FIFO holds more than `DEPTH` words or fewer than none.
* Observation ports carry the two synchronized pointers and each
  synchronizer's per-bit `rand_evt` / `rand_late` / `blocked_evt` flags, for
  coverage.

Parameters and their defaults:

| module | parameter | default | origin |
|---|---|---|---|
| `async_fifo` | `PTR_W` | 3 | the 3-bit Gray counter of the worked case |
| `async_fifo` | `DATA_W` | 8 | own choice |
| `async_fifo`, `smart_sync`, `smart_sync_bit` | `SYNC_STAGES` / `STAGES` | 2 | own choice (two back-to-back flops) |
| all synchronizers | `SEED` | 1 | own choice |
| `smart_sync`, `smart_sync_filter` | `VEC_SIZE` | 3 | matches the pointer width |

## What follows the published technique and what is this design's own

Taken from the technique:

* the basic-layer capture rule;
* candidacy that an input change sets and a clock edge clears;
* the `transition_vld` hook;
* the filter rule ("only bits changed in the most recent update");
* the on-demand random stream;
* the Gray-pointer FIFO with a 3-bit pointer as the worked example.

Choices made here where the technique says nothing:

* **Pseudocode.** The published form sets candidacy and samples in one
  process sensitive to both `d` and the clock. Here that is split into an
  event process that counts changes and a clocked process that compares
  counts. The behaviour is the same and the code is legal SystemVerilog.
* **Filter rule.** The filter pseudocode, taken literally, compares two
  copies of the same value. The stated intent, marking the bits changed in
  the latest update, is what is implemented.
* **Not specified by the technique and chosen here:**
  * the asynchronous resets;
  * the number of stages;
  * xorshift32 as the generator;
  * the event outputs;
  * the FIFO's depth, data width, flag logic and fall-through read.

## Simulating

Each testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. It also has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/smart_sync_pkg.sv tb/tb_async_fifo.sv --top-module tb_async_fifo
./obj_dir/Vtb_async_fifo
```

`--timing` is required because the synchronizer models use event controls.
Each run takes well under a second.

| testbench | what it establishes |
|---|---|
| `tb_smart_sync_bit` | For 3000 edges with random input and random filter veto: a non-candidate arrives after exactly `STAGES` edges with the current value; a candidate gives one of {previous, current}; the event flags match; late resolution, early resolution and veto all occur. |
| `tb_smart_sync_filter` | `transition_vld` equals new XOR old after every update (single-bit, multi-bit, and rewrites of the same value) and holds between updates. |
| `tb_smart_sync` | The 2:1 Gray-pointer case. Every output is the newest or the previous count. Jumps never exceed three counts, and three-count jumps, including 000→001→110, do occur. Per-bit rules also hold under random multi-bit updates. |
| `tb_gray_ptr` | Binary count, Gray value, look-ahead, one-bit-per-step, wrap, reset. |
| `tb_fifo_mem` | Random writes against a shadow copy, read back on every address. |
| `tb_async_fifo` | The whole FIFO at its default parameters, with a 2:1 clock ratio. Four phases: writer every cycle, drain, single writes with a latency check (3 or 4 read edges), random traffic. A scoreboard checks order and data. Full, empty, late resolution on both sides, filter vetoes and three-count pointer jumps must all occur. |

Each testbench has been shown to fail on a deliberately broken copy of its
module, and on an empty module.

## Limits

* The synchronizer models are for simulation only (see above). Synthesis
  tools read the input-watching process as combinational logic and report a
  loop through its change counter; that report does not apply to the model.
* The filter's notion of "one update" is a change of the vector. The
  vector must therefore come glitch-free from source flops.
* Only the first synchronizer stage is modelled as uncertain. A flop that
  stays metastable for longer than one cycle is not modelled.
* The write-side synchronizer in the 2:1 FIFO never vetoes anything. Its
  source, the read pointer, changes at most once per write cycle, so its
  filter is exercised only through `tb_smart_sync`.
