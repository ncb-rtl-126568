# NCB: a fetch stage that delivers two non-consecutive basic blocks per cycle

A wide superscalar core can only issue what its fetch stage hands it, and an
ordinary fetch stage stops at every taken branch. With basic blocks of four to
six instructions in integer code, an 8-wide fetch is rarely full even when
every branch is predicted correctly. Schemes that fetch across branches by
reading two cache lines, predicting several branches and shifting and merging
the pieces need extra logic or extra pipeline stages.

The **non-consecutive basic block buffer (NCB)** avoids that work at fetch
time. It is a small cache, organised like a branch target buffer, whose lines
already hold a basic block that ends in a branch *followed by* the basic block
at that branch's taken target, in program order and undecoded. The PC looks it
up in parallel with the instruction cache; when it hits and the branch
predictor says "taken", the whole line goes to the decoder in one cycle and
the next PC comes from the line. No aligning or merging happens in the fetch
path: the merging is done off the critical path by a **fill unit** that
watches the instruction stream and writes new lines.

This repository holds synthesizable SystemVerilog for that fetch stage: the
instruction cache, the NCB, the gshare predictor, the run selector and the
fill unit, with a self-checking testbench for each and an end-to-end testbench
that runs a synthetic program through the whole stage with a back-end model
resolving branches.

## One fetch cycle

```
            PC ──┬──────────────┬───────────────────┐
                 v              v                   v
            I-cache (2 banks)  NCB (512x2)      gshare (12-bit BHR, 4096 PHT)
                 │              │                   │ taken?
                 v              v                   v
            up to 8 words   2-block line  ──>  run_select ──> run + next PC to decoder
                 │                                  │
                 └───────────> fill unit <──────────┘ (delivered runs, redirects)
                                   │
                                   └──> NCB write
```

Every cycle (`ncb_fetch_unit`):

1. The PC indexes all three structures. Reads are combinational, so a run is
   produced in the same cycle the PC is presented and the fetch loop has no
   bubble.
2. `run_select` looks at the NCB line for this PC, if any. Its first basic
   block ends in a branch. If that branch is an unconditional jump, or the
   gshare counter says taken, the **NCB run** is delivered: up to 8
   instructions from two places in the program. The next PC is the line's
   next-address field.
3. Otherwise the **I-cache run** is delivered. It holds the 8 words from the
   PC onward, cut after the first branch (fetch never goes past a branch). The
   next PC is the address after the last delivered word. An I-cache miss
   stalls this path only. A taken NCB run can still be delivered during a
   miss.
4. The predicted direction of each delivered branch is shifted into the
   global history right away (speculative history update). The counters are
   trained later, when the back end resolves the branch.

Each delivered run carries every instruction's address. For an NCB run the
first block's addresses count up from the PC and the second block's count up
from the stored target. The back end therefore sees an ordinary instruction
stream and recovers from a mispredicted branch inside an NCB run exactly as it
would for an I-cache run.

## The NCB line

| field      | width | meaning |
|------------|-------|---------|
| tag        | 21    | start address of the first basic block, above the 9 index bits and the 2 byte bits |
| inst[0..7] | 8x32  | first block (its branch last), then the second block |
| len        | 4     | valid instructions, 1..8 |
| bb1_len    | 4     | instructions in the first block, its branch included |
| target     | 32    | start address of the second block (the branch's taken target) |
| br2        | 1     | the line ends with a second branch |
| next       | 32    | address following the last instruction: the predicted next PC |

The tag, instructions and next address are the line as the mechanism defines
it. `len`, `bb1_len`, `target` and `br2` are added here. Without them the
fetch unit could not give the second block's instructions their addresses,
and it would have to decode in the fetch path. The default geometry is 512
sets × 2 ways: the NCB takes the place, and the size, of a 512-set 2-way BTB.
That gives 1024 lines, and 32 KB of instruction words. A line is found
through bits [10:2] of its start address. Replacement uses one LRU bit per
set. A write for a start address already present overwrites that way.

**Second branch.** The second block was fetched as an I-cache run, so it may
end in a branch of its own. That branch is kept in the line. The next-address
field is its fall-through, so it is in effect predicted not-taken, and it
shifts a 0 into the history. Only one predictor lookup happens per cycle, and
it is used for the first branch.

## How lines are built: the fill unit

This part is the hardest to follow, because it has to learn the taken target
without a BTB. The NCB *replaces* the BTB, so when the NCB misses, a branch
predicted taken has no known target. Fetch then carries on down the
fall-through path, and the back end later redirects it to the target. The
fill unit (`fill_unit`) uses that redirect:

| state | meaning | leaves on |
|-------|---------|-----------|
| IDLE  | line buffer empty | a delivered I-cache run ending in a branch predicted taken (`fill_trigger`) → copy it as the first block, go to HOLD |
| HOLD  | first block held, its branch not yet known to be taken | redirect *from that branch* with outcome taken → ARMED; any other redirect → IDLE; another triggering run → replace the buffer; other runs (wrong path) are ignored |
| ARMED | the next delivered run starts at the target | the next delivered run: append its first basic block until the line is full, write the line to the NCB, → IDLE (or HOLD if that run itself triggers) |

Merging stops when two basic blocks are in the buffer or the 8 slots are
full. So a 5-instruction first block and a 6-instruction second block give a
line of 5 + 3 with no second branch. If the first block already fills all 8
slots, the line is written with an empty second block, and its next address
is the taken target. Such a line still helps: it works as a BTB entry. If the
run at the target comes from the NCB itself, only its first basic block is
used, so a line never holds more than two blocks. The write to the NCB is
registered: it lands one clock after the completing run.

The instructions are stored undecoded and in program order. This is what lets
mispredictions inside an NCB run be repaired normally.

## Branch prediction and recovery

`gshare_predictor` has a 12-bit global history register (BHR) and 4096 2-bit
counters (the PHT), indexed by `pc[13:2] XOR BHR`. The PC used is the fetch
PC, which is the start of a basic block except after a run was cut at 8
instructions. Only the history is updated speculatively. Each run shifts in
the direction the fetch unit actually followed: 1 for the first branch of an
NCB run, 0 for an I-cache run's branch and for an NCB run's second branch.

Each run carries, for each of its (up to two) branches, its slot, the
direction followed, the PHT index used and the history before the shift. The
back end uses these as follows:

* **Every resolved branch** that was predicted by the PHT is trained through
  `update_valid / update_idx / update_taken`, with the index echoed back.
* **A branch whose actual successor differs from the one fetched** causes a
  redirect: `redirect_pc` (correct next PC), `redirect_bhr` (the echoed
  history with the actual outcome shifted in), and `redirect_br_pc` /
  `redirect_taken` (used by the fill unit). A redirect wins over everything in
  its cycle: the run offered in that cycle is dropped, and the PC and history
  are loaded at the next edge.

The PHT has no reset. After reset it is set to weakly not-taken by a sweep
that writes one entry per cycle, 4096 cycles in all. Training updates that
arrive during the sweep are dropped. Keeping one write port and no reset lets
the table map onto a RAM. Unconditional jumps (J, JAL, JR, JALR) are
always treated as taken and do not use the PHT. Branches are recognised by
their MIPS opcodes (`ncb_pkg::is_branch`). No branch delay slots are assumed.

## Instruction cache

`icache` is 64 KB, 4-way set-associative, with 32-byte (8-instruction)
blocks, split into two banks by block-address parity. Both banks are read
every cycle: one for the PC's block, the other for the block after it. So any
8 consecutive instructions come out in one cycle, whatever the PC's alignment.
A run needs the second block only when the PC is not block-aligned.

The cache asks the next level for a block (`refill_req_valid` /
`refill_req_addr`, held until answered) in two cases:

- **Miss.** The PC's block is absent, or the run needs the next block and it
  is absent. `hit` stays low until the block arrives.
- **Sequential prefetch.** The PC's block hits but the block after it is
  absent. Fetch goes on meanwhile, so that block is usually there (or on its
  way) by the time fetch reaches it.

Only one request is outstanding at a time. The returned 8 words go into a way
chosen round-robin. With a next level that answers 6 cycles after the request,
a cold aligned fetch hits 7 cycles after it is first presented: one cycle to
see the miss, six to refill. A cold unaligned fetch that needs two blocks
takes 14.

## Top-level interface (`ncb_fetch_unit`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (PC ← `RESET_PC`, caches and NCB invalid, history 0) |
| `fb_valid` | out | 1 | a run is offered |
| `fb` | out | `fetch_bundle_t` | `pc[8]`, `inst[8]`, `len`, `from_ncb`, `br0`, `br1`, `next_pc` |
| `fb_ready` | in | 1 | the decoder takes the run; low stalls fetch (e.g. a full instruction window) |
| `redirect_valid`, `redirect_pc`, `redirect_bhr`, `redirect_br_pc`, `redirect_taken` | in | 1, 32, 12, 32, 1 | misprediction recovery |
| `update_valid`, `update_idx`, `update_taken` | in | 1, 12, 1 | PHT training |
| `refill_req_valid`, `refill_req_addr` | out | 1, 32 | I-cache miss request |
| `refill_resp_valid`, `refill_data` | in | 1, 8×32 | block returned by the next level |
| `ncb_fill` | out | 1 | pulse: the fill unit wrote a line |

A run is taken in a cycle where `fb_valid && fb_ready` and no redirect is
applied. `br_info_t` holds `valid`, `slot`, `pred_taken`, `uses_pht`,
`pht_idx` and `bhr`. All shared types are in `rtl/ncb_pkg.sv`.

Parameters: `RESET_PC` (0x0040_0000), `IC_SIZE_BYTES` (65536), `IC_WAYS` (4),
`NCB_SETS` (512). The fetch width (8), the history length (12) and the PHT
size (4096) are package constants in `ncb_pkg`.

## What is not here, and where this design makes its own choices

* **Back end.** The decoder, the instruction window (a 128-entry RUU in the
  evaluated machine), the functional units and the data cache are outside
  this design. The fetch unit stops at the decoder interface, and the
  testbench models the back end. The second-level cache is treated as ideal
  and is modelled in the testbenches.
* **No BTB.** Targets are known only through NCB lines. A branch predicted
  taken with no NCB line is fetched as not-taken and repaired by a redirect.
  This costs a redirect the first time each taken branch is met, and whenever
  its line has been evicted.
* **Fill-unit timing.** The second block is taken from the run fetched after
  the branch is confirmed taken, as described above. Taking simply the next
  fetched run would merge the fall-through path here, because there is no
  target to fetch from.
* **Single-cycle fetch** with combinational reads of all arrays. This is the
  structure the mechanism calls for: no stage is added to fetch. A
  synchronous-SRAM version would need the array reads retimed.
* Index bits, replacement policies, reset values, the handshake and the back-end
  interface are this design's own. The comment at the top of each file says
  which.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | checks |
|-----------|--------|
| `tb_gshare_predictor` | random shifts, restores and updates against a reference model; counters saturating both ways |
| `tb_ncb_buffer` | random writes and lookups against a 2-way LRU reference model; evictions and in-place overwrites |
| `tb_icache` | 7-cycle aligned and 14-cycle unaligned cold misses, round-robin eviction in one set, 3000 random fetches over a 96 KB program |
| `tb_run_select` | source choice, run length, per-slot addresses, branch records, next PC, history shifts and fill trigger |
| `tb_fill_unit` | merges, the cut at a full line, a full first block, wrong-path runs ignored, non-matching and not-taken redirects, second block from an NCB run, back-to-back lines |
| `tb_ncb_fetch_unit` | the whole stage at default sizes (below) |

`tb_ncb_fetch_unit` runs a synthetic MIPS-like program of 24576 words
(`tb/tb_prog_pkg.sv`: BEQ and J branches, with always-taken, never-taken,
loop-like and alternating behaviour). The program is served by an ideal next
level with a 6-cycle answer. The back-end model checks every delivered
instruction against the correct path, redirects on the first wrong successor,
trains the PHT, and drops `fb_ready` at random. It runs two workloads of
200,000 cycles each, from reset: basic blocks of about 5 instructions
(integer-like) and about 12 (floating-point-like). It requires at least one
I-cache refill, NCB write, NCB run, two-branch NCB run, NCB run cut at the
full line, redirect and stall in each. It also requires NCB runs to be longer
than I-cache runs. Measured on this synthetic code:

| workload | correct-path instr./cycle | NCB runs avg. length | I-cache runs avg. length | share of runs from NCB |
|----------|------|------|------|------|
| integer-like (BB ≈ 5) | 4.54 | 6.82 | 5.47 | 41 % |
| fp-like (BB ≈ 12)     | 3.24 | 7.45 | 6.19 | 20 % |

The fp-like program walks through more distinct code, so it takes many more
I-cache misses. That is why its rate is lower. The useful comparison is the
share of runs that come from the NCB.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ncb_pkg.sv tb/tb_prog_pkg.sv tb/tb_ncb_fetch_unit.sv \
    --top-module tb_ncb_fetch_unit -o sim
./obj_dir/sim
```

Use the same command for the other testbenches, with their own name.
`tb/tb_prog_pkg.sv` is only needed by `tb_icache` and `tb_ncb_fetch_unit`.
The full-size end-to-end run takes a few seconds.

## Files

| file | contents |
|------|----------|
| `rtl/ncb_pkg.sv` | widths, run and line types, branch predecode |
| `rtl/ncb_fetch_unit.sv` | top: PC, wiring, handshake |
| `rtl/icache.sv` | two-bank interleaved I-cache with refill |
| `rtl/ncb_buffer.sv` | the NCB |
| `rtl/gshare_predictor.sv` | gshare with speculative history |
| `rtl/run_select.sv` | NCB / I-cache run selection, addresses, next PC |
| `rtl/fill_unit.sv` | line buffer and merging |
| `tb/tb_prog_pkg.sv` | synthetic program and branch oracle |
| `tb/l2_model.sv` | behavioural ideal next level |
| `tb/tb_*.sv` | testbenches |
