# ACBTB: a branch target buffer that counts instead of searching

A conventional branch target buffer (BTB) is a tagged, set-associative cache.
The fetch stage looks it up with the PC on every cycle, just to find out
whether the instruction being fetched is a branch and where it goes. Most of
those lookups miss, and each one costs a tag and data array read. In an
embedded processor that spends most of its time in a few loops ("hot
spots"), none of this searching is needed. The compiler already knows, for
every branch, how many instructions the program runs before the next control
instruction on each path.

This RTL implements an application-customisable BTB (ACBTB) built on that
fact. Software loads a small table with one entry per control-altering
instruction of the hot spot. A down-counter then counts fetches to the next
control instruction, and the table is read only when the counter reaches
zero, once per branch. No tags, no associative search, and no conflict
misses: every control instruction of the hot spot has its own entry. The
unit also contains a gshare direction predictor for conditional branches,
the predictor the proposal's evaluation paired with it. A processor that has
its own predictor can override it.

The architecture (entry fields, CNT and IND registers, several tables with
one active, software-writable CNT/IND, the indirect branch identification
table) follows the ACBTB proposal by P. Petrov and A. Orailoglu. The
interfaces, encodings, misprediction recovery, hot-spot exit and sizes that
the proposal leaves open are this implementation's own, and are marked as
such below.

## How tracking works

Two registers carry the state:

* **CNT**: how many fetch units (instructions; packets on a VLIW machine)
  remain before the next control instruction.
* **IND**: the table index of that next control instruction.

Each table entry describes one control instruction:

| field | meaning |
|-------|---------|
| `NT_D` | instructions between this one and the next control instruction on the not-taken (fall-through) path |
| `NT_I` | table index of that next control instruction |
| `T_D`  | the same distance on the taken path, counted from the target |
| `T_I`  | table index of the next control instruction on the taken path |
| `TA`   | target word address (direct jumps, calls, returns, conditional branches) |
| `Type` | class of instruction and a static direction hint |

On every fetch while tracking:

* **CNT ≠ 0:** the instruction is an ordinary one. CNT is decremented by one
  and the table is not touched.
* **CNT = 0:** the instruction is a control instruction. Entry IND of the
  active table is read combinationally, in the same cycle (first fetch stage).
  A direction is chosen, and CNT and IND are loaded from `T_D/T_I` or
  `NT_D/NT_I`. The fetch stage gets `br_valid`, `br_type`, `br_taken` and
  `br_target` in that cycle, and uses them to pick the next fetch address.

A distance counts the instructions strictly between two control instructions.
So CNT = 0 means "the next fetch is the branch", and two adjacent branches
have a distance of 0.

Example: a loop `B1 … B6` with `branch1` ending B1 (taken to B3), a jump
ending B2 (to B4), `branch2` ending B4 (taken to B6) and a loop branch ending
B6. For `branch1`, `T_D = |B3| + |B4| − 1` and `T_I` points to `branch2`.
`NT_D = |B2| − 1` and `NT_I` points to the jump. The testbench builds exactly
this loop, plus a call and return, an indirect switch and a chain of short
branches, and derives every entry from the instruction layout.

### Choosing the direction

| class (`Type[2:0]`) | direction used |
|---|---|
| `BT_COND` (1) | `dp_taken` if `dp_valid` (the processor's own predictor), else the built-in gshare predictor, else (with `GSHARE_HIST = 0`) the static hint `Type[3]` |
| `BT_JUMP` (2), `BT_CALL` (3), `BT_RET` (4) | taken |
| `BT_IJUMP` (5), `BT_ICALL` (6) | taken, target unknown: see below |
| `BT_NONE` (0) | end of hot spot: tracking switches off |

The built-in predictor is a gshare scheme: 2^`GSHARE_HIST` two-bit
saturating counters, indexed by the branch's address XOR a global history of
the last `GSHARE_HIST` outcomes. The unit never sees the fetch PC, so the
branch's entry number in the active table (`IND` when the branch is
identified) stands in for its address. Inside a hot spot that number is
unique per branch; entry numbers wider than the history are folded (XOR) onto
it. The history is updated only when a branch resolves, not speculatively.
Each identified conditional branch records its counter position in a small
FIFO that runs in step with the misprediction records. The counter is trained
when the branch resolves, and the record is dropped with the others on a
misprediction. Counters reset to weakly not-taken.

Returns are treated like direct jumps. Inside a hot spot a return's
destination is fixed at link time, provided the function has one call site in
that hot spot.

## Mispredictions

CNT and IND follow the *predicted* path, because the fetch stage needs the
next address long before the branch executes. The instructions fetched after
a mispredicted branch are flushed, so their decrements must be undone.

Instead of counting them, the unit keeps one record per in-flight conditional
branch in a small FIFO (`acbtb_ckpt`). The record holds the predicted
direction and the other path's distance and index. Both come from the same
table read, so there is still one table access per branch.

The processor reports outcomes in program order on `res_valid/res_taken`.
On a mismatch, `mispredict` rises in the same cycle and CNT/IND are loaded
from the record. The FIFO is emptied, because everything younger was on the
wrong path. The front end must discard whatever it fetched in that cycle and
restart, from the next cycle on, at the correct address. Correct-path
fetching then counts from exactly the right place.

A mispredicted exit (for example a loop branch predicted not-taken) may
already have switched tracking off at the end-of-hot-spot entry. The restore
switches it back on.

If a control instruction is due (CNT = 0) while the FIFO is full,
`fetch_stall` holds fetch until a branch resolves. The default depth is 4.

The processor should assert `res_valid` only for conditional branches that the
unit reported on `br_valid`, for example by carrying that bit down the
pipeline. A resolution that arrives with no record is ignored.

## Indirect jumps and calls

The destination of an indirect jump is known only when the jump executes. So
is the position of the next control instruction. When the unit identifies an
indirect jump or call, it leaves CNT/IND alone. It raises `ind_wait` and
`fetch_stall` until one of two things restarts tracking:

1. **IBIT (indirect branch identification table).** When the jump executes,
   the processor gives its destination on `ijmp_valid/ijmp_target`. The
   unit looks the destination up, once, in the IBIT. This is a small fully
   associative table of `{destination, CNT, IND}` entries, which software
   fills for every known destination. On a hit, CNT and IND are loaded and
   fetch resumes at the destination.
2. **Software.** The compiler places two stores, to IND and then to CNT,
   before the indirect jump. A store made while a jump is waiting acts at
   once. A store made while tracking still runs normally (the jump has not
   been fetched yet) is *staged*. The staged values are loaded when the next
   indirect jump is identified, and no wait happens then. A staged IND is
   used only together with a staged CNT.

Staged software values, when present, are used as soon as the jump is
identified. Otherwise the IBIT is tried when the destination arrives, and on
a miss the unit keeps waiting for the software store. Both methods can be
mixed within one hot spot; the testbench does so.

## Entering and leaving a hot spot; several tables

The unit holds `NUM_TABLES` identical tables (default 5), and only the active
one is read. Software can load every hot spot's table once at program start,
then switch tables on entry to each hot spot. Entering a hot spot is three
stores:

1. `IND` = index of the first control instruction,
2. `CNT` = instructions from the first fetched instruction up to that
   control instruction,
3. `CTRL` = `{active table, enable}`.

A store to `CTRL` also empties the misprediction FIFO and clears any wait or
staged values. The CNT value must count from the first instruction that the
front end fetches *after* the store.

To leave, the compiler gives the hot spot's exit path an entry of class
`BT_NONE`. When the counter reaches that entry, tracking switches off, and
afterwards fetches pass through untouched (`br_valid` = 0, no table reads).
Software can also clear `enable`. The `BT_NONE` exit entry is this
implementation's addition; the proposal does not say how tracking stops.

## Interfaces

### Fetch and execute side (`acbtb_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `fetch_valid` | in | 1 | one fetch unit fetched this cycle |
| `fetch_stall` | out | 1 | hold fetch (indirect wait, or branch due with FIFO full); a fetch during a stall is ignored |
| `dp_valid`, `dp_taken` | in | 1, 1 | optional external prediction for this fetch; when `dp_valid` is low the built-in gshare decides |
| `br_valid` | out | 1 | this fetch is a control instruction (combinational from `fetch_valid`) |
| `br_type` | out | 4 | `br_type_t`: `{static_taken, class}` |
| `br_taken` | out | 1 | direction chosen |
| `br_target` | out | 32 | `{TA, 2'b00}`; 0 for indirect jumps |
| `br_idx` | out | 6 | table index of the instruction |
| `res_valid`, `res_taken` | in | 1, 1 | in-order outcome of a reported conditional branch |
| `mispredict` | out | 1 | outcome differs from the chosen direction (same cycle) |
| `ijmp_valid`, `ijmp_target` | in | 1, 32 | destination of a waiting indirect jump |
| `enabled`, `ind_wait` | out | 1, 1 | status |
| `tbl_access`, `ibit_access` | out | 1, 1 | a table read or IBIT lookup happens this cycle (for energy accounting) |
| `sw_we`, `sw_addr`, `sw_wdata`, `sw_rdata` | | 1, 16, 32, 32 | software bus: single-cycle write, combinational read, word addresses |

Within one cycle the priority is: misprediction restore, then IBIT reload,
then staged software values, then a direct software store, then
identification, then decrement.

### Software address map (`acbtb_pkg`)

| `sw_addr` | register |
|---|---|
| `0 · table[2:0] · entry[5:0] · field[1:0]` | table entry field: 0 = `{NT_I[31:16], NT_D[15:0]}`, 1 = `{T_I, T_D}` likewise, 2 = `TA`, 3 = `Type` |
| `1 0 … 00` | `CTRL`: `[0]` enable, `[15:8]` active table |
| `1 0 … 01` | `CNT` |
| `1 0 … 10` | `IND` |
| `1 0 … 11` | `STATUS` (read only): `[0]` CNT zero, `[1]` indirect wait, `[2]` staged CNT held, `[15:8]` in-flight branches |
| `1 1 … entry[3:0] · f` | IBIT entry: f = 0 `{valid[31], destination word address[29:0]}`, f = 1 `{IND[31:16], CNT[15:0]}` |

Table number bits start at bit 8 (`2 + log2(ENTRIES)`). Stores to a table
number of `NUM_TABLES` or above are ignored. Table contents are not reset,
so load them before enabling.

## Parameters

| parameter | default | origin |
|---|---|---|
| `ENTRIES` | 64 | proposal: a hot spot needs at most 64 entries, so indices are 6 bits |
| `DIST_W` | 9 | proposal: distances fit in 8–9 bits |
| `NUM_TABLES` | 5 | chosen: the largest number of hot spots in any evaluated benchmark |
| `TA_W` | 30 | chosen: 32-bit byte PC with 4-byte instructions. With the fields above an entry is 64 bits |
| `IBIT_ENTRIES` | 16 | chosen; the proposal gives no size |
| `CKPT_DEPTH` | 4 | chosen |
| `GSHARE_HIST` | 10 | proposal: its evaluation used gshare with a ten-bit global history. 0 removes the predictor |
| `NT_I_IMPLICIT` | 0 | proposal's option: number the control instructions in program order and drop `NT_I`, so the not-taken successor is `IND + 1`. Off by default, so `NT_I` is used |

## Modules

```
acbtb_top
├── acbtb_table   NUM_TABLES × ENTRIES entries, fetch read port + software port
├── acbtb_cnt     CNT, T/NT multiplexer, decrement, zero comparator
├── acbtb_ind     IND, T/NT multiplexer (or IND+1)
├── acbtb_ckpt    misprediction records (FIFO)
├── acbtb_ibit    indirect branch identification table
├── acbtb_gshare  gshare direction predictor (when GSHARE_HIST > 0)
└── acbtb_ctrl    identification, direction, recovery, indirect handling, address decode
acbtb_pkg         Type encoding, address map
```

The table and IBIT are plain arrays, so they map to flip-flops or to a small
register file. The only path through the table read is
CNT → zero → read entry IND → select → CNT/IND inputs, all within the fetch
cycle. The proposal argues that a 64-entry direct-mapped read fits easily in
one cycle.

## Simulating

Each testbench is self-checking, prints `TB_RESULT checks=N failures=M`, and
has a watchdog.

```
verilator --binary --timing --assert -Irtl -Itb rtl/acbtb_pkg.sv \
    tb/tb_acbtb_top.sv --top-module tb_acbtb_top
./obj_dir/Vtb_acbtb_top
```

The unit benches are run the same way: `tb_acbtb_table`, `tb_acbtb_cnt`,
`tb_acbtb_ind`, `tb_acbtb_ckpt`, `tb_acbtb_ibit`, `tb_acbtb_gshare` and
`tb_acbtb_ctrl`.

* `tb_acbtb_top` runs the whole unit at its default parameters, using the
  program and in-order processor model in `tb/acbtb_e2e_bench.sv`. The model
  resolves branches 10 cycles after fetch, gives random outcomes, and inserts
  random fetch bubbles and instruction-memory stalls. It offers a random
  prediction in about half of the fetches. In the others the gshare predictor
  decides, and the bench checks it against its own model of the predictor. The hot spot runs 150 iterations twice, from table 1 and then from
  table 3; table 0 holds junk.
  * On every fetch it checks the branch flag, type, direction, target and
    index, and that the table is read exactly on control instructions.
  * It counts how often each mechanism occurs (identification, decrement,
    misprediction restore, IBIT reload, software release, staged software
    update, stall on a full FIFO, hot-spot exit, re-enable by a late
    misprediction, table switch, gshare prediction), and fails if any never
    does.
  * It takes about 29,000 cycles and well under a second.
* `tb_acbtb_top_ntimp` runs the same program with `NT_I_IMPLICIT = 1` and
  deliberately wrong `NT_I` fields.
* `tb_acbtb_top_static` runs it with `GSHARE_HIST = 0`, so a conditional
  branch with no offered prediction must follow its static hint.
* `tb_acbtb_workloads` and `tb_acbtb_workloads_large` run synthetic programs
  shaped like the benchmarks in the next section, using
  `tb/acbtb_wl_bench.sv`. For each benchmark the bench builds every hot spot
  with its exact number of conditional branches, direct jumps and indirect
  jumps.
  * Basic-block lengths are uniform around the benchmark's mean distance
    between branches; gsm encode also gets one block of 300 instructions.
  * Branches and jumps go to a random later instruction. Each indirect jump
    has two random later destinations. The last conditional branch closes
    the loop.
  * The dynamic prediction is right at the benchmark's prediction accuracy
    (for example 79% for adpcm encode, 98% for gsm decode).
  * The bench computes all table entries from the layout and loads hot spot
    *h* into table *h*. It loads up to 16 indirect destinations per hot spot
    into the IBIT and releases the rest through software stores.
  * It runs each hot spot as a loop, and checks every fetch as the end-to-end
    bench does. For each benchmark it prints fetches against table reads.
  * `tb_acbtb_workloads` runs adpcm, g721 and gsm (encode and decode) at the
    default parameters, with 200 iterations per hot spot.
    `tb_acbtb_workloads_large` runs epic, jpeg, mp3 and mpeg with
    `ENTRIES = 1024`, with 60 iterations per hot spot.
  * Both finish in well under a second.

## Capacity against the evaluated benchmarks

The proposal evaluates MediaBench-style programs by their hot spots. An
entry is needed per conditional branch, direct jump and indirect jump, plus
one end-of-hot-spot entry in this implementation.

| benchmark | hot spots | entries per hot spot | fits 5 × 64 |
|---|---|---|---|
| adpcm enc / dec | 1 / 1 | 18 / 14 | yes |
| g721 enc | 3 | 12, 59, 11 | yes |
| g721 dec | 2 | 12, 61 | yes |
| gsm enc | 5 | 30, 6, 5, 13, 27 | yes (longest basic block ≈300 instructions < 511) |
| gsm dec | 2 | 12, 5 | yes |
| epic | 1 | 127 | no |
| jpeg | 2 | 97, 716 | no |
| mp3 | 5 | 382, 504, 56, 112, 513 | no (one of five fits) |
| mpeg | 3 | 256, 29, 44 | no (two of three fit) |

The proposal states that 64 entries suffice. Its own branch counts for the
larger programs exceed that, so those programs need larger tables
(the address map allows up to 10-bit indices with up to 8 tables). Alternatively, a hot
spot can be split so that software reloads a table part-way through. Indirect
destinations beyond the 16 IBIT entries are handled by the software store
path.

In `tb_acbtb_workloads` the table is read on 8% (gsm encode, dominated by its
long block) to 27% (g721 encode) of fetches. A conventional BTB is searched on
every fetch. With `tb_acbtb_workloads_large` the ratio is 14% to 19%. These
ratios come from the synthetic layouts, not from the real
programs.

The workload bench also feeds the same branches to a model of a conventional
set-associative BTB. The model has 128 or 64 entries, is four- or eight-way,
uses LRU replacement and allocates on a miss. The ACBTB identifies every
branch. The BTB model hits about 99% of the time on the small programs and
85% to 93% on the large ones. With these short synthetic runs most of its
misses are first-time misses, so the numbers show the trend only. They are
not a measurement of the real programs.

## Where this implementation goes beyond or departs from the proposal

* **Direction used for CNT/IND.** The proposal describes loading CNT and IND
  after the branch executes, and notes that flushed instructions must be
  subtracted after a misprediction. Here they are loaded with the predicted
  direction at fetch and restored from a per-branch record, so the table is
  still read once per branch.
* **Table reads per branch.** The proposal says the table is read once per
  branch. In one place it also says that conditional branches need no
  lookup. Here every control instruction reads its entry once, because its
  distances and indices are needed.
* **Leaving a hot spot.** This uses the `BT_NONE` entry, which is an addition
  of this implementation.
* **Fetch width.** The decrement is one per fetch unit: an instruction on a
  scalar core, a packet on a VLIW. Superscalar cores, which fetch a
  variable number of instructions, are outside the proposal's scope and are
  not supported.
* **Power-down of inactive tables.** This is a physical-design matter. Here
  it appears only as reading the active table alone.
* **Direction predictor.** The proposal only names gshare with a ten-bit
  history as the predictor used in its evaluation. Indexing it by table entry
  instead of PC, training it only at resolution, and letting `dp_valid`
  override it are choices of this implementation.
* **Not included.** The processor pipeline and the compiler pass that builds
  the tables. The fetch and resolution ports and the software bus are where
  they connect.
