# Early wakeup for a drowsy L1 data cache

A drowsy cache saves leakage power by running most of its lines at a reduced
supply voltage. A drowsy line keeps its data but cannot be read or written;
raising its supply back to nominal ("waking" it) takes a cycle or two, and
every load or store that lands on a drowsy line pays that delay. This RTL
hides most of that delay. It predicts which line a load or store will touch
as soon as the instruction is fetched, and wakes that line while the
instruction is still travelling down the pipeline.

The prediction reuses the idea of PC-based way prediction. A small table,
indexed by the PC, records for each load/store which set and way of the data
cache it accessed last time. Programs touch the same data block from the same
instruction again and again, so that record is usually right for the next
execution. The scheme follows "Early wakeup: improving the drowsy cache
performance" (Shim, Chung, Choi, Kim, Turkish Journal of Electrical
Engineering & Computer Sciences, 2014). The RTL, and every detail that
publication leaves open, are this design's own.

## How a wakeup gets ahead of the access

The processor pipeline is outside this RTL, but the timing only works
because of its shape. The reference pipeline is in-order, with the stages
Fetch, Decode, Issue, Reg, Exe, Mem and WB:

```
cycle:        t        t+1        t+2         t+3    t+4    t+5
stage:        Fetch    Decode     Issue       Reg    Exe    Mem
table:        lookup   entry out
wakeup:                decide     wk_valid -> line raising supply
line (W=1):                                   awake  awake  access, no stall
```

1. **Fetch (cycle t).** The fetch PC also reads the prediction table
   (`fe_valid`, `fe_pc`). The read is synchronous.
2. **Decode (t+1).** The table entry (hit, set index, way number) is now
   available. The core also says whether the instruction is a load or store
   (`de_is_mem`). If it is, and the table hit, `ew_wakeup_ctrl` registers a
   wakeup request.
3. **Issue (t+2).** The request drives the cache's wakeup port for one cycle
   (`wk_valid`, `wk_set`, `wk_way`). The addressed line starts raising its
   supply.
4. The line is accessible `WAKE_CYCLES` cycles later, from cycle
   t+2+`WAKE_CYCLES` on. The access reaches the cache in Mem, at cycle t+S+1,
   where S is the number of stages between Fetch and Mem.

So the access pays `max(0, WAKE_CYCLES - (S - 1))` wakeup cycles instead of
`WAKE_CYCLES`:

- The wakeup is hidden completely when S >= `WAKE_CYCLES` + 1.
- Some cycles are saved when 1 < S < `WAKE_CYCLES` + 1.
- Nothing is saved with a single stage between Fetch and Mem.

The reference pipeline has S = 4, so a 1- or 2-cycle wakeup disappears
entirely.

A wrong prediction costs no time. It wakes a line that will not be used,
which costs some power, and the real access then wakes its own line on
demand, exactly as in a plain drowsy cache. When the table misses or the
instruction is not a load/store, nothing happens, and the cache behaves as a
conventional drowsy cache.

Every access that touches a line writes back into the table: a load or store
hit, or the refill of a load miss. The write goes to the entry of the
load/store's own PC and records the set and way used (`upd_*` from the cache
into the table). A store miss allocates nothing, so it writes nothing.

## The drowsy data cache (`ew_dcache`)

Default geometry: 32 KB, 2-way set associative, 32-byte lines. That gives
512 sets, a 9-bit set index, a 5-bit byte offset and, with 32-bit addresses,
an 18-bit tag.

- **Power modes per line.** Each of the 1024 data lines has its own
  controller, `ew_line_pwr_ctrl`, with three modes: drowsy, waking and awake.
  - Its `active` output is the supply-select control of a super-drowsy SRAM
    line. That is the transistor circuit which switches the line's virtual
    supply rail between a nominal and a reduced voltage. The circuit itself
    is not part of this RTL.
  - A wakeup takes `WAKE_CYCLES` cycles.
  - Two sources can wake a line: the access port (on demand) and the wakeup
    port (early). When a wake and a sleep come in the same cycle, the wake
    wins, so a line is never put to sleep under an access that is waiting
    for it.
- **Going drowsy.** `ew_drowsy_timer` implements the simple policy of the
  original drowsy cache. Every `DROWSY_WINDOW` cycles (default 4000) it sends
  all lines to sleep. Lines in use are woken again on demand or early.
  `drowsy_en = 0` stops the timer, giving a cache that never goes drowsy
  after its lines have first been woken.
- **Tags stay awake.** Only the data lines are drowsy. Tags and valid bits
  stay at nominal supply, so hit, miss and the hit way are known in the
  access cycle without waking anything. Only the one line that hit is woken.
- **Two address ports.** The access port and the wakeup port work in the
  same cycle. The wakeup port has its own set/way decoder, and a wakeup only
  raises a line's supply: it never uses the bit lines or word lines.
- **Access latency** on the access port (`req_valid`/`req_ready`, one access
  at a time; `rsp_valid` is a one-cycle pulse):

  | case | response after acceptance |
  |---|---|
  | load hit, line awake | 1 cycle; the next access can be accepted in that cycle |
  | hit, line drowsy (`ev_drowsy`) | 1 + `WAKE_CYCLES`, less if an early wakeup is already in progress |
  | store hit | the line is written at once; the word is written through, and `rsp` follows once the next level has accepted the write |
  | load miss | a line read is sent to the next level, the victim line is woken meanwhile, `rsp` comes the cycle after the refill |
  | store miss | written around the cache (no allocation) |

- **Replacement.** A fill takes the first invalid way. Otherwise it takes the
  way after the most recently used one, which is LRU for two ways.
- **Next-level port** (`mem_req_*`, `mem_rsp_*`). A valid/ready request, held
  stable until accepted. It is either a one-word write with byte strobes or
  a read of one line. `mem_rsp_valid` with `mem_rsp_line` returns the line
  whenever it is ready.

The cache carries two assertions:

- a next-level request stays stable until it is accepted;
- the cache never reads, writes and fills in the same cycle.

## The prediction table (`ew_pred_table`)

The table is direct mapped, with `PT_ENTRIES` entries (default 1024),
indexed by `PC[2 +: log2(PT_ENTRIES)]`.

- **Entry.** An entry is {valid, set index, way number}. The set index is as
  wide as the cache's index (9 bits) and the way number is log2(ways) wide
  (1 bit).
- **Hit.** The valid bit decides a table "hit". It is cleared at reset and
  set by the first update. There is no PC tag, so PCs that alias share an
  entry.
- **Timing.** Reads are synchronous and hold their output between reads. A
  read and a write of the same entry in one cycle return the old contents.

Sizes 1024, 512, 256, 128 and 64 are the ones the scheme was evaluated with.
Smaller tables alias more PCs and predict worse. Any power of two can be set.

## Top level (`ew_top`)

`ew_top` wires the table, the wakeup control and the cache together. It
registers `fe_valid` to mark an instruction's first decode cycle. Its ports:

- **Pipeline side.** `fe_valid`/`fe_pc` say that an instruction leaves Fetch.
  `de_is_mem` is valid in the following cycle. `req_*`/`rsp_*` is the
  memory-stage access port, whose `req_pc` is the load/store's PC.
- **Memory side.** The next-level port `mem_*`.
- **Controls.** `early_wakeup_en` (0 gives the conventional drowsy cache) and
  `drowsy_en`.
- **Observation.** `ev_access`, `ev_miss`, `ev_drowsy` (an accepted hit
  found its line not awake), `ev_early_wake`, and `line_active`, the supply
  state of every line (bit `way*NUM_SETS + set`).

Parameters, all with defaults from the package `ew_pkg`:

| parameter | default | origin |
|---|---|---|
| `NUM_SETS`, `NUM_WAYS`, `LINE_BYTES` | 512, 2, 32 | the evaluated 32 KB 2-way cache |
| `PT_ENTRIES` | 1024 | largest evaluated table |
| `WAKE_CYCLES` | 1 | a wakeup takes 1-2 cycles |
| `DROWSY_WINDOW` | 4000 | this design (classic drowsy-cache window) |
| `ADDR_W`, `DATA_W` | 32, 32 | this design |

## What is not here

- **The processor.** The scheme was evaluated on a core issuing two instructions per cycle.
  This RTL has one fetch port and one memory port. A wider core would need
  one table read port per fetched instruction and would have to choose which
  wakeups to send.
- **The L2 cache and main memory** (256 KB 4-way L2 with an 8-cycle latency,
  64-cycle memory in the evaluation).
- **The transistor-level super-drowsy line.** Its supply switch is
  represented only by the `active` signal, and its storage by the data array.

Choices made here, where the scheme leaves things open:

- the valid bit and the PC bits that index the table;
- tags that never go drowsy;
- write-through with no write allocation, and the replacement rule;
- the periodic sleep policy and its window;
- wake winning over sleep;
- all handshakes;
- issuing the wakeup from a register at the end of Decode.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_ew_line_pwr_ctrl`: exact wakeup latency for 1 and 3 cycles, sleep,
  wake-over-sleep, and a sleep aborting a wakeup.
- `tb_ew_drowsy_timer`: the sleep period, and no sleep while disabled.
- `tb_ew_pred_table`: random reads and writes against a reference table,
  covering misses, aliasing and read-before-write.
- `tb_ew_wakeup_ctrl`: random decode inputs against the decision rule.
- `tb_ew_dcache`: a reduced cache (16 sets, `WAKE_CYCLES` = 2) against a
  reference memory and tag model. It checks:
  - the exact latency of awake and drowsy hits;
  - the latency `1 + max(0, WAKE_CYCLES - k)` for a line woken through the
    wakeup port k cycles ahead;
  - data, hit/miss, way and table updates over 6000 random accesses;
  - write-through contents.
- `tb_ew_top`: the full default configuration, driven by a behavioural
  in-order pipeline (Fetch, Decode, Issue, Reg, Exe, Mem, then write-back,
  which stalls the pipeline when a response is late) and a next level with
  an 8-cycle read latency. It runs a loop kernel with:
  - a sequential array, which is mostly predicted right;
  - a scalar, always right;
  - a store/reload array;
  - a load that alternates between two lines, always predicted wrong.

  The kernel runs three times: with drowsy mode off, with the conventional
  drowsy cache, and with early wakeup. It checks every load's data, that
  early wakeup reduces both the drowsy accesses and the cycle count, and
  that each mechanism occurred (early wakeups, demand wakeups, misses and
  refills, global sleeps, stalled write-throughs, mode switches). About 97%
  of lines are drowsy on average. The drowsy accesses that remain come from
  the alternating load and from the first touch of each new line by the
  array walks, where the prediction points to the previous line.
- `tb_ew_stage_depth`: five default-size caches, each with a pipeline of a
  different depth. It confirms the timing rule of the first section for
  every drowsy access of a perfectly predictable kernel:

  | `WAKE_CYCLES` | stages between Fetch and Mem | wakeup cycles paid per access |
  |---|---|---|
  | 2 | 1 | 2 (no gain) |
  | 2 | 2 | 1 (partial) |
  | 2 | 3 | 0 |
  | 1 | 1 | 1 (no gain) |
  | 1 | 2 | 0 |

- `tb_ew_table_sweep`: prediction tables of 1024, 256 and 64 entries on a
  kernel with 128 load PCs, each reading its own line. With 1024 or 256
  entries, about 99% of the accesses to drowsy lines disappear. With 64
  entries, four PCs share each entry, and only about a quarter disappear.

These kernels are synthetic. They exercise the mechanisms, but they do not
reproduce the benchmark results of the original evaluation.

Simulating with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ew_pkg.sv rtl/ew_top.sv \
          tb/tb_ew_top.sv --top-module tb_ew_top -Mdir obj_top
./obj_top/Vtb_ew_top
```

Replace the top file and the testbench for the other blocks. Always list
`rtl/ew_pkg.sv` first. The testbenches initialise every state they read, so
they also pass with random initial values
(`+verilator+rand+reset+2`).
