# Program-flow-sensitive drowsy instruction cache (pfsDIC)

A drowsy cache saves leakage by keeping its lines at a low retention voltage.
A drowsy line keeps its contents but cannot be read until it has been switched
back to the full supply and a short wakeup time has passed. The hard part is
waking the right line early enough, without keeping many lines awake "just in
case".

This design solves it by making the processor tell the cache, a fixed number
of clocks in advance, exactly which instruction address it will fetch. Each
clock the CPU side puts one predicted fetch address on an *instruction address
bus*, `LAT` clocks before the pipeline needs that instruction. The cache side
wakes the line of that address as soon as it sees it. It delivers the word
`LAT` clocks later, and puts the line back to drowsy as soon as its last
needed word has gone out. In the steady state a direct-mapped cache has about
one line awake per clock out of 512. The end-to-end test measures 1.03 lines
per clock on average and 2 at most.

`LAT` is the wakeup latency: the line's wakeup time plus one clock for the
extra logic on the cache side. With the default 1-clock wakeup, `LAT = 2`.

All RTL is in `rtl/` (SystemVerilog 2017, one module per file, shared types in
`pfsdic_pkg`). The testbenches are in `tb/`.

## Block map

```
                 CPU side (pfsdic_cpu_side)                    cache side (pfsdic_cache_side)
  ID stage ──► btb_bbsize ◄── bb_fifo ◄── bb_counter
      │            │ lookup                                     ┌─► lines_sensor
      │            ▼                                            │        │
      │       pred_pc_gen ──── instruction address bus ───────► pcl_fifo ─► stage_master
      │            │                                            │        │
      │            ▼                                            │   power_manager ─► line_power_ctrl x lines
      │        pta_fifo                                         │        │ ready
      │            │ top                                        ▼        ▼
      └──────►  "?=" ──── DIC reset ─────────────────────►  content_transmitter ◄─► icache_array
                                                                │   Way#           ▲
                 IF ◄──────────────── data bus ─────────────────┘   refill_ctrl ───┘◄── memory
```

`pfsdic_top` joins the two sides. The host pipeline (a classic five-stage
MIPS-like pipeline that resolves branches at the end of ID) and main memory
are outside. Their signals are ports.

## Predicting the address stream: BBSize

A normal BTB lookup of the current PC only predicts one clock ahead. Here the
generator has to know, `LAT` clocks ahead, where the flow goes next.

Each BTB entry carries one extra field, **BBSize**. It holds the number of
instructions from the branch's predicted successor up to the next branch. The
successor is the target if the branch is predicted taken, the fall-through
otherwise. When a branch is resolved in ID and its prediction was right, the
address of the *next* branch is known at once:

```
next_branch = id_next_pc + 4 * BBSize
```

`pred_pc_gen` looks that address up in the BTB (one lookup per basic block,
instead of one per clock). It keeps the result as the "next branch". It then
counts sequentially until the PC reaches that address, and there follows the
predicted direction. So a taken branch's target is on the address bus as soon
as the flow gets there, without waiting for the branch to reach ID.

Without a valid BBSize, or after a wrongly predicted branch, the generator
simply predicts sequential execution.

BBSize values are learnt on the fly:

* `bb_counter` counts the instructions decoded since the last branch.
* `bb_fifo` is a 2-entry FIFO of `{BTB index, prediction}`.
  * The bottom holds the branch just looked up for the flow ahead.
  * The top holds the branch whose following basic block is being measured.
* When the next branch is verified in ID, the counter value is the top
  branch's BBSize. It is written into the BTB if the top entry is flagged
  **Update**.
* The flag of the newly verified branch is then chosen:
  * **Update** if its prediction changed, or if its BBSize is still empty;
  * **Freeze** otherwise, because a stable prediction keeps its BBSize.

The BTB is direct mapped with 256 entries and a 2-bit saturating predictor.
It enters every branch.

## Keeping both sides in step: the two FIFOs

Both sides hold a FIFO whose elements are the addresses put on the bus over the
last `LAT` clocks. The FIFO has `LAT + 1` elements; the bottom is the bus
address of this clock.

* **PTA FIFO** (predictive tracing address, CPU side). Its top is the address
  whose instruction is on the data bus now. The "?=" comparator checks that
  top against the true successor of the instruction in ID. A mismatch raises
  **DIC reset** (`if_kill`):
  * the instruction arriving in IF is dropped;
  * both FIFOs are flushed and every line goes drowsy;
  * the PC restarts at the true address.
* **PCL FIFO** (preactivating cache line, cache side). Each element holds the
  address and a *word location*.

Timing, with `LAT = 2`:

| clock | bus (FIFO bottom) | FIFO element 1 | FIFO top, data bus |
|-------|-------------------|----------------|--------------------|
| t     | A: ON for A's line starts | | |
| t+1   | B                 | A              |                    |
| t+2   | C                 | B              | A: word of A on the data bus, IF |

Costs of the schemes:

* After a DIC reset, the next instruction reaches IF `LAT + 1` clocks later.
* A miss stops the flow while the line is refilled. The first instruction
  comes `LAT` clocks after the refill ends.

The testbenches check these clock counts exactly.

## Word location, ON and OFF

The `lines_sensor` compares the line address of the new bus address with the
previous one (FIFO element 1). It gives every element one of four word
locations:

| code | name   | meaning |
|------|--------|---------|
| 0    | head   | first word taken from this line in a run |
| 1    | trail  | last word taken from this line before the flow leaves it |
| 2    | medium | neither |
| 3    | single | head and trail at once (one word used, then the flow leaves) |

The `power_manager` acts on both ends of the PCL FIFO in the same clock. Each
cache line has a `line_power_ctrl` switch. The switch selects the line with a
*function operation*: "this set" or "this set, other ways".

| stage | FIFO element | head | trail |
|-------|--------------|------|-------|
| ON    | bottom       | wake every way of the set | — |
| OFF   | top          | put the other ways of the set to drowsy | put every way of the set to drowsy |

On a head, every way of a set is woken because the hit way is not yet known.
The tag compare at the top then picks one way, and the others go back to
drowsy.

`stage_master` keeps the OFF stage from turning off a line that a younger FIFO
element still needs:

* a trail is not turned off while any younger element uses the same set;
* a head does not turn off the other ways while a younger element uses
  another line of that set.

A wakeup counter in each line controller reports the line *ready* `WAKEUP`
clocks after it was switched on. The array refuses to read a line that is not
ready.

## Content transmitter and Way#

At the FIFO top, `content_transmitter` reads the word:

* **Head word:** does the tag compare over all ways and records the hit way in
  the `Way#` register.
  * A match in a ready way is a hit even if another way of the set is still
    waking up. This happens when the flow comes back to a line within the
    FIFO window. A line lives in one way only, so the waking way cannot hold
    it too.
* **Medium or trail word:** reads `Way#` + index directly, with no tag compare
  and only one way awake.

If the tag compare finds no way, the word is a **miss**:

* `refill_ctrl` restarts the flow at the missing address;
* it invalidates the victim way (round robin when there are several ways);
* it holds the address bus and takes `WORDS` words in order from the `mem_*`
  port;
* it writes the tag with the last word.

A line found not ready (which the prediction scheme should never allow) gives
a restart without refill. The tests check that it never happens.

## Interface of `pfsdic_top`

| port | dir | meaning |
|------|-----|---------|
| `if_valid`, `if_instr`, `if_addr` | out | instruction for IF this clock; ignore it when `if_kill` is high |
| `if_kill` | out | DIC reset: wrong prediction found, IF instruction killed |
| `id_valid`, `id_pc` | in | instruction in ID |
| `id_next_pc` | in | its true successor address (resolved at the end of ID) |
| `id_is_branch`, `id_taken`, `id_target` | in | branch flag, outcome and target |
| `mem_req`, `mem_addr` | out | line refill request; the address is line aligned |
| `mem_rvalid`, `mem_rdata` | in | refill words, in order, any gaps allowed |
| `bus_valid`, `bus_addr` | out | the predicted address stream (observation) |
| `line_active`, `active_count` | out | lines at full supply (index `set*WAYS+way`) and how many there are |
| `ev_*` | out | one-clock event flags for statistics (ON, OFF-others, OFF-all, suppressed OFF, tag compare, Way# reuse, miss, idle, BTB lookup, predicted-taken jump, BBSize update/freeze/write) |

The ID inputs must describe the instruction that was delivered on `if_*` one
clock earlier. The host must also give `id_next_pc` in the same clock.

Parameters, with their defaults from the basic configuration:

| parameter | default | meaning |
|-----------|---------|---------|
| `CACHE_BYTES` | 32768 | cache size (8 KB – 128 KB evaluated) |
| `WAYS` | 1 | associativity (1, 2, 4 evaluated) |
| `WORDS` | 16 | 32-bit words per line (4, 8, 16 evaluated) |
| `WAKEUP` | 1 | wakeup time in clocks (1, 2, 4 evaluated); `LAT = WAKEUP + 1` |
| `BTB_ENTRIES` | 256 | BTB size, this design's choice |
| `BBSIZE_W` | 9 | BBSize width; 352 instructions was the largest basic block in the benchmarks considered |
| `RESET_PC` | 0 | first fetch address |

Addresses and instructions are 32 bits wide.

## Where this design departs from the original scheme

* **Lines sensor.** The scheme marks both elements *medium* when two
  neighbouring addresses share a line. Here the older element keeps its head
  mark. Otherwise the first word of every line would be lost as a head, and
  the ON stage, OFF stage and tag compare all depend on it.
* **Single code.** Code 3 (single) is added for a line that is left after one
  word.
* **Tag width.** The tag is 17 bits (32-bit byte addresses, 9 index bits, 6
  offset bits). The reference figures quote 14 tag bits for this size, which
  implies a smaller address space.
* **Own choices where the scheme says nothing:**
  * refill and miss handling, and replay of a not-ready line;
  * turning every line drowsy on a DIC reset;
  * the BTB organisation and size;
  * clearing BBSize when a BTB entry is replaced.
* **Stage master.** The scheme gives its job ("no two modules use the same
  resource") but not its logic. The conflict rule above is this design's own.
* **Variants not built.** Only the basic configuration is built: all branches
  enter the BTB, one BBSize per entry. The variants compared against it
  (taken-only insertion, two BBSize fields per entry) are not built. Nor are
  the sub-banked and simple turn-off reference caches.
* **Energy.** Leakage energy is not modelled. `active_count` and the
  testbench's average active lines per clock are the inputs such a model
  would use.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares the module against a reference model kept in the testbench and ends
with `TB_RESULT checks=N failures=M`.

* `tb_pfsdic_top` runs the whole design at its default parameters.
  * The host is a behavioural IF/ID front end. Memory has a 4-clock first-word
    latency.
  * The program is a generated 4096-word program of basic blocks ending in
    counted loops, alternating branches, jumps, biased-random and never-taken
    branches.
  * It checks every instruction reaching ID against an architectural
    reference, the exact clock counts after a kill and after a refill, and
    that no drowsy line is ever read.
  * It counts every mechanism listed under `ev_*` and fails if one never
    occurs.
  * Typical result: 40000 instructions in 43904 clocks (about 10% more clocks
    than instructions) with 909 wrong predictions and 47 misses. 1.03 active
    lines per clock on average, 2 at most.
* `tb_pfsdic_top_cfg` runs the same test with 8 KB, 4 ways, 8 words per line
  and a 2-clock wakeup.
* `tb_pfsdic_top_w4` runs it with 16 KB, 2 ways, 4 words per line and a
  4-clock wakeup (`LAT = 5`). It has 2.7 active lines per clock on average out
  of 1024, and 8 at most.
* `tb_pfsdic_cpu_side` runs a loop program against an ideal cache. After
  warm-up only the loop exit, and the branch after it, cause DIC resets.

To run one testbench with plain verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
          -Irtl rtl/pfsdic_pkg.sv tb/tb_pfsdic_top.sv \
          --top-module tb_pfsdic_top -o sim
./obj_dir/sim
```

Replace `tb_pfsdic_top` with any other testbench name. Every file is
two-state clean: all state is reset or initialised. The top testbench's
program size, instruction count and seed are `localparam`s at the top of its
file.
