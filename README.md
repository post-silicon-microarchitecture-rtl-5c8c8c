# Post-silicon microarchitecture: an agent and fabric designs for an out-of-order core

A general-purpose core ships with fixed predictors and prefetchers. Some
programs defeat them: their branches depend on loaded data, or their misses
follow pointers. This design lets application-specific microarchitecture be
added after the chip is made. A small, fixed **agent** sits beside the core.
It watches retiring instructions, changes how the core runs, and feeds the
core branch directions, instructions to execute, and prefetch/load
operations. It talks to a **reconfigurable fabric** region that runs on a
slower clock and holds a design written for one program's hot loop.

This repository holds:

- the agent;
- the dual-clock queues between the agent and the fabric;
- four fabric-side designs that show how the interface is used:
  - a decoupled custom branch predictor;
  - control-flow decoupling;
  - a strided prefetcher with adaptive distance;
  - a load-dependent-load prefetcher.

The core and the programmable fabric itself are not included. The core's
signals are ports of the top level. The fabric is stood in for by fixed RTL
for each of the four designs, with a register that selects which one is
"loaded".

Main configuration (the defaults):

- the fabric clock is 4x slower than the core clock (set by the clocks you
  drive in);
- the fabric moves W = 4 payloads per fabric cycle on each queue;
- every queue holds Q = 32 payloads.

## How the pieces fit

```
            core clock                       |        fabric clock
  retire ──► RST ──► ObsQ-R ─────────────────┼──► ┌──────────────────────┐
                 └─► mode control ─► squash / │    │ rf_sel chooses one:  │
                     checkpoint / restore     │    │  psm_exact_bp        │
  fetch  ◄── FST + IntvQ-F head ◄────────────┼─── │  psm_cfd             │
  load lane ◄── IntvQ-IS head (pinned) ◄─────┼─── │  psm_prefetch_engine │
  load value ──► ObsQ-EX ────────────────────┼──► │  psm_ldl_prefetch    │
                                             |    └──────────────────────┘
```

Files, bottom-up (all in `rtl/`):

| file | role |
|---|---|
| `psm_pkg.sv` | shared widths and payload types: RST entry, ObsQ-R, IntvQ-F, IntvQ-IS and ObsQ-EX payloads |
| `psm_async_fifo.sv` | one-wide dual-clock FIFO (Gray pointers, two-flop synchronisers) |
| `psm_queue.sv` | W-wide dual-clock queue built from W one-wide FIFOs used round-robin |
| `psm_rst.sv` | Retire Snoop Table |
| `psm_mode_ctrl.sv` | execution modes and requests to the core |
| `psm_fetch_intv.sv` | Fetch Snoop Table and the IntvQ-F head logic |
| `psm_issue_intv.sv` | IntvQ-IS head logic and the ObsQ-EX push |
| `psm_agent.sv` | the agent: everything above plus the four queues and the squash marker |
| `psm_exact_bp.sv`, `psm_cfd.sv`, `psm_prefetch_engine.sv`, `psm_ldl_prefetch.sv` | fabric designs |
| `psm_top.sv` | agent plus fabric region, with the design select |

## The agent

### Retire Snoop Table and observation payloads

Each RST entry holds:

- a PC;
- six configuration flags: enable PSM, full squash, custom branch
  prediction, disable PSM, enable instruction fetch, disable instruction fetch;
- two payload-type bits: branch direction, destination value.

When a retiring PC matches an entry, an ObsQ-R payload is pushed. It carries
the PC, the flags, the taken bit (if the branch bit is set) and the
destination value (if the value bit is set).

- Lookup is combinational and fully associative, with 16 entries. The
  lowest index wins on multiple matches.
- One retiring instruction is examined per core cycle.
- If ObsQ-R is full, `retire_stall` holds the instruction at retire.
- Payloads are made only while PSM is on, or by the entry that turns it on.

### Modes (`psm_mode_ctrl`)

The flags of the matching entry change the core's modes. Modes and requests
are registered, so they change the cycle after the retire.

- **Enable PSM:** starts a region of interest.
- **Full squash:** sets full-squash mode (mispredictions squash from the
  ROB head) and pulses `squash_req`.
- **Custom BP:** makes fetch consult the agent.
- **Enable instruction fetch:** pulses `squash_req` and `checkpoint_req`.
  The core then fetches from the agent.
- **Disable instruction fetch:** pulses `restore_req`.
- **Disable PSM:** clears every mode.

Flags other than enable act only inside a region. If one entry carries both
an enable and a disable, the enable acts first.

### Fetch side (`psm_fetch_intv`)

In custom-BP mode every fetched PC is looked up in the FST and compared with
the IntvQ-F head. There are four head commands:

| head | effect |
|---|---|
| `BRANCH_DIR` for this PC | overrides the core's prediction, popped |
| something else, FST hit | core keeps its own prediction |
| empty queue, FST hit | **fetch stalls**: the fabric is late |
| `SYNC` | default predictions until an instruction with the SYNC's PC is fetched, which pops it |
| `DONE` | popped; default predictions for the rest of the episode |
| `INSTRUCTION` (instruction-fetch mode) | handed to the core as the fetched instruction; fetch stalls on anything else |

**Resynchronisation after a squash.** A misprediction squashes the core.
Predictions that were already used up for the squashed instructions are then
lost, so the core and the fabric no longer agree on where they are in the
prediction stream. The agent handles this in two steps:

1. It pushes a **squash marker** (a payload with the `squash` bit) into
   ObsQ-R, so the fabric knows.
2. The fetch side discards IntvQ-F payloads up to the next `SYNC`.

A fabric design recovers by sending `SYNC` and then fresh predictions. While
PSM is off, anything reaching the head of IntvQ-F or IntvQ-IS is discarded,
so a new region never sees a previous region's leftovers.

### Issue side (`psm_issue_intv`)

The fabric sends `LOAD` and `PREFETCH` operations. When the core reports a
bubble in its load lane, the head operation is issued (`issue_valid`). It
**stays at the head of the queue** until the core resolves it, so only one
runs at a time.

- A resolved prefetch is popped.
- A resolved load's value, with its address, goes into ObsQ-EX before the
  pop. If ObsQ-EX is full, the value is held until there is room.

### Queues and clock crossing (`psm_queue`)

The core side pushes or pops one payload per core cycle. The fabric side
moves up to W per fabric cycle. The queue is made of `max(PUSH_W, POP_W)`
one-wide asynchronous FIFOs, written and read round-robin. Each FIFO uses
Gray-coded pointers and two-flop synchronisers. Full and empty flags are
conservative, so space and occupancy appear a few cycles late across the
crossing.

Assertions check that a producer never pushes more than `push_space` and a
consumer never pops more than `pop_avail`.

## The fabric designs

All four take a fabric-clock configuration port (`cfg_we/cfg_addr/cfg_data`).
Through it they learn the PCs they snoop and their tuning values. Each module's
opening comment gives its register map.

### Decoupled custom branch predictor (`psm_exact_bp`)

This design targets a worklist-driven grid fill, such as A* path search
"make bound" code. For each index in an input worklist, it tests 8
neighbours:

- **branch E:** already visited in this fill?
- **branch F:** is the map cell free?

A neighbour that passes is marked visited (**store H**) and appended to the
output worklist (**store G**). The input and output worklists swap on each
call.

Conventional predictors fail here because the outcomes depend on data. The
design instead re-executes the data flow ahead of the core:

- **Mirrored worklists and two pointers.** The retire stream keeps an
  architectural copy up to date: START, CALL, INDEX, the E/F outcomes, and
  the G/H stores. A speculative pointer reads indices ahead of the core.
  For each index it forms the 8 neighbour indices and looks up two
  direct-mapped tables:
  - `waymap`: 16384 entries of 8-bit fill epochs. An entry equal to the
    current epoch means "visited", so a new fill needs no clearing.
  - `maparp`: 131072 x 1 bit, meaning "free", learned from retired F
    outcomes.

  Together the tables are 32 KB. The worklists are 512 entries each.
- **Running ahead.** Predictions go into IntvQ-F, up to W per fabric cycle.
  When the design predicts an append, it marks the cell visited and appends
  to its own output worklist. This lets it carry on into the next worklist
  before the core gets there. It runs at most one worklist ahead, and never
  overwrites worklist entries the core has yet to read.
- **Undo log.** Every speculative waymap write is logged. The matching
  retired H store commits it.
- **Resynchronisation.** On a squash marker the design:
  1. undoes all uncommitted speculative writes;
  2. sends `SYNC` carrying the PC of the INDEX load;
  3. waits for the next INDEX load to retire. By then every store of the
     previous index has retired.
  4. restarts its speculative state from the architectural state and
     predicts that index again.
- **End.** When the worklists run out it sends `DONE`.
- **Clearing.** After reset, and when the 8-bit epoch wraps, both tables are
  cleared one entry per fabric cycle (131072 cycles). Predictions start
  after that.

### Control-flow decoupling (`psm_cfd`)

This design handles the same loop shape in a different way. A store inside
the loop body (marking a cell visited) changes later outcomes of branch B,
which tests "visited". So the branch slice cannot simply be run ahead on its
own. One run proceeds as follows:

1. A retiring loop-entry instruction starts the run. Its flags:
   - enable instruction fetch: the core squashes and checkpoints;
   - custom BP;
   - its value is the iteration count.
2. The design streams the slice from a small slice memory as INSTRUCTION
   payloads: a prologue once, the body once per iteration, then an exit
   instruction. The body reuses the same virtual PCs on every iteration, so
   the RST entries for its loads match every iteration.
3. It snoops the slice's loads as they retire: fill number, index, the
   neighbour's waymap value, and the map value. From these it computes the B
   and C outcomes.
4. The slice has no stores. Instead a direct-mapped **index table** records
   the cells the body will mark. A later B whose cell is in the table is
   forced to "visited". Entries carry a per-run tag, so nothing is cleared
   between runs.
5. The exit instruction (disable instruction fetch) restores the checkpoint.
   The buffered outcomes are then streamed as `BRANCH_DIR` payloads for B
   and C, followed by `DONE`.

### Strided prefetcher with adaptive distance (`psm_prefetch_engine`)

The design snoops a loop's stride, iteration count and base address from
retiring instructions. It then issues `PREFETCH base + j*stride`, keeping `j`
below *(core iteration + distance)*. Core iterations are counted from
retirements of the delinquent load.

Every `WINDOW` iterations it compares the cycles taken with the previous
window:

- faster: it keeps moving the distance in the same direction;
- otherwise: it reverses.

The distance moves by `DIST_STEP` within `[DIST_MIN, DIST_MAX]`. The
defaults are 8, 16, 2, 1 and 64 (initial distance, window, step, min, max),
all this design's choices.

### Load-dependent load prefetcher (`psm_ldl_prefetch`)

This handles a pointer array (`a[j]` at `base + j*stride`) whose targets are
loaded next. It runs three streams over `j`:

- a **prefetch stream** for `a[j]`, up to `PF_DIST` iterations ahead of
  retirement;
- a **load stream** issuing Load OPs for `a[j]`, kept `LD_DELAY` iterations
  behind the prefetch stream. A load then rarely misses and blocks the
  pinned head of IntvQ-IS.
- a **dependent prefetch** of `value + DEP_OFFSET` for every value returned
  through ObsQ-EX.

Each cycle fills free slots in priority order: dependent prefetches, then
loads, then prefetches.

## Top level (`psm_top`)

`psm_top` instantiates the agent and all four fabric designs. The fabric
register `rf_sel` (written with `rf_cfg_target = 4`) picks the design that
is connected. The others see no payloads and cannot push.

- Core-side ports are the agent's.
- The fabric side has the configuration port and each design's counters:
  predictions, resyncs, run-aheads, DONEs, commits, injected instructions,
  forced outcomes, prefetch distance, and dependent prefetches.

Parameters:

| parameter | default | meaning |
|---|---|---|
| `Q` | 32 | depth of each queue |
| `W` | 4 | payloads per fabric cycle on each queue and per fabric design |
| `RST_ENTRIES`, `FST_ENTRIES` | 16 | snoop-table sizes (this design's choice) |

Fabric-design sizes are parameters of those modules. At their defaults:

| design | sizes |
|---|---|
| EXACT | 512-entry worklists; 16 KB + 16 KB tables; 512-entry undo log |
| CFD | 64-word slice memory; 16384-entry index table; 8192-outcome buffer |

## Where this design departs from, or adds to, the architecture it follows

- **Fabric not modelled.** The fabric is fixed RTL plus a select register.
  The fabric's pipeline latency is not modelled: each design produces its
  results in one fabric cycle.
- **Single-wide core side.** The agent accepts one retiring instruction and
  one fetched PC per core cycle. A 4-wide core would need four lookups per
  cycle, or must serialise snooped instructions.
- **This design's own mechanisms** (the architecture only names the need to
  resynchronise, not how):
  - the squash marker in ObsQ-R;
  - the drain-to-SYNC on the fetch side;
  - discarding stale payloads while PSM is off;
  - the EXACT undo log, epoch tags and resync protocol.
- **EXACT** assumes the code shape described above: START, CALL, INDEX, E,
  F, G and H identified by PC. The neighbour order and the branch polarity
  are set by registers. After the epoch wraps, the start cell of the first
  fill may mispredict once.
- **CFD** follows one neighbour per loop iteration (register 12) with one
  map branch per iteration. It sends the outcomes only once the whole slice
  has been streamed.
- **Prefetch distance.** The feedback is a simple hill climb over windows.
  Other feedback rules would fit the same interface.
- **Load-dependent prefetching.** Only a constant-stride pointer array with
  one dependent field offset is handled.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_psm_queue` | 4:1 and 1:4 clock ratios; 1-in/4-out and 4-in/1-out; every value in order; holds exactly 32 |
| `tb_psm_rst`, `tb_psm_mode_ctrl` | payload contents, stall on full, mode precedence and request pulses |
| `tb_psm_fetch_intv` | override, stall, SYNC, DONE, INSTRUCTION, drain after squash |
| `tb_psm_issue_intv` | single outstanding op, pinned head, load value to ObsQ-EX, ObsQ-EX full |
| `tb_psm_agent` | whole agent across the clock crossing: payload order, 4 predictions in one fabric cycle, load round trip, squash marker |
| `tb_psm_exact_bp` | a core model runs two fills of a 16x16 grid (below) |
| `tb_psm_cfd` | slice stream, every outcome correct including forced ones, second run without clearing |
| `tb_psm_prefetch_engine` | a core whose iterations slow down on late prefetches (below) |
| `tb_psm_ldl_prefetch` | ordering and spacing of the three streams, pointer + offset for every returned value |
| `tb_psm_top` | end to end at the default parameters (below) |

More detail on three of them:

- **`tb_psm_exact_bp`.** The first fill trains the map table and
  resynchronises after every squash. The second fill must be predicted
  without a single misprediction. It must also run ahead and end in DONE.
- **`tb_psm_prefetch_engine`.** Addresses must be exact and never beyond
  the current distance. The distance must adapt within its bounds.
- **`tb_psm_top`.** It runs at the default parameters with a 4:1 clock
  ratio. It runs four programs in turn (prefetch, load-dependent, CFD, two
  EXACT fills) on a minimal core model. It counts every mechanism and fails
  any that never happened:
  - overrides, fetch stalls, injected instructions;
  - squash, checkpoint and restore requests;
  - squash markers with drain, resync, DONE;
  - issued and pinned operations, values through ObsQ-EX;
  - distance changes, dependent prefetches, run-ahead, commits, forced
    outcomes.

  It also checks that the trained EXACT fill and the CFD run have no wrong
  predictions.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/psm_pkg.sv rtl/psm_async_fifo.sv \
  rtl/psm_queue.sv rtl/psm_rst.sv rtl/psm_mode_ctrl.sv rtl/psm_fetch_intv.sv \
  rtl/psm_issue_intv.sv rtl/psm_agent.sv rtl/psm_exact_bp.sv rtl/psm_cfd.sv \
  rtl/psm_prefetch_engine.sv rtl/psm_ldl_prefetch.sv rtl/psm_top.sv \
  tb/tb_psm_top.sv --top-module tb_psm_top -o sim && ./obj_dir/sim
```

For a single block, list `psm_pkg.sv`, the block's files and its testbench.

Lint notes:

- Verilator reports unused bits of the 64-bit configuration data and of
  payload structs, and asynchronous-reset signals used in assertion
  `disable iff` clauses. These are expected.
- The EXACT and CFD tables are large multi-ported arrays. Synthesis tools
  take a long time on them.
