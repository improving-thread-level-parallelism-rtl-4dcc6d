# EXPARS: more CTAs per SM by keeping registers in scratchpad memory

Many GPU kernels are limited by the register file. Once the registers of the
resident CTAs run out, the SM cannot take another CTA, even with most of the
48KB scratchpad memory idle. EXPARS adds CTAs beyond that limit and places part
of their registers in the unused scratchpad:

- **RF CTAs** keep all their registers in the register file (RF), as usual.
- **Mix CTAs** keep registers `0 .. Start_Reg-1` in the RF and registers
  `Start_Reg .. Max_Reg` in the scratchpad.

The scratchpad has one 32-bit port per bank and cannot feed operands at
register-file speed. So before a warp runs an *instruction bundle*, a
*register prefetcher* copies that bundle's scratchpad-resident registers into
a small *operand cache* (OC, 2KB). During the bundle, those operands come from
the OC. A compiler-inserted `PREF` instruction tells the hardware which
registers the next bundle uses.

More CTAs also mean more contention. A *lazy two-level warp scheduler* measures
how many warps are actually useful, and from then on limits the number of
schedulable warps to that figure.

This repository is the SystemVerilog RTL of the EXPARS additions to one Fermi
streaming multiprocessor, with self-checking testbenches. The rest of the SM is
outside the RTL: fetch, decode, the execution units, and the compiler that
inserts `PREF`. It reaches the top module as ports.

## The SM configuration

All defaults describe a Fermi-class SM. They live in `rtl/expars_pkg.sv`.

| Quantity | Value |
|---|---|
| Register file | 32,768 × 32-bit registers (128KB), 4 banks |
| Scratchpad | 48KB in 32 banks of 32-bit words |
| CTA slots | 8 |
| Thread slots | 1,536 (48 warps of 32 threads) |
| Architectural registers per thread | at most 63 |
| Operand cache | 4 banks × 4 sets × 1,024-bit lines = 2KB |
| τ (largest share of a CTA's registers that may go to scratchpad) | 0.8 |

One *line* is one architectural register of one warp: 32 threads × 32 bits =
1,024 bits = 128 bytes. Lines are the unit of the OC, the RF model and the
register regions in the scratchpad.

## Deciding how many CTAs fit (`cta_calc`)

At kernel launch the SM receives three numbers:

- registers per thread;
- warps per CTA;
- scratchpad bytes per CTA, `S_CTA`.

With `R_CTA` registers per CTA, `R` = 32,768 and `S` = 49,152 bytes, the
baseline holds `CTA_Lower = floor(R / R_CTA)` CTAs. This is capped by the CTA
slots, the thread slots and the scratchpad.

EXPARS looks for the largest `CTA = CTA_RF + CTA_Mix` that meets four
conditions:

- **Register file:** `CTA_RF·R_CTA` plus the RF part of every mix CTA ≤ `R`.
- **Scratchpad:** `CTA·S_CTA` plus the spilled part of every mix CTA ≤ `S`.
- **Upper bound:** `CTA` ≤ `CTA_Upper`. This is the smallest of three limits:
  - the 8 CTA slots;
  - the 1,536 threads;
  - the combined capacity `floor((4R + S) / (4R_CTA + S_CTA))`, which counts
    scratchpad bytes as 4-byte registers.
- **τ:** a mix CTA places at most τ of its registers in the scratchpad.

The register split is made in whole architectural registers. A mix CTA gets
`k = floor((R − CTA_RF·R_CTA) / (CTA_Mix · threads per CTA))` registers per
thread in the RF, so `Start_Reg = k`.

The optimum can be written in closed form, but rounding to whole registers and
the τ bound make that form awkward in hardware. The block therefore searches
instead:

- It tries `N = CTA_Upper` down to `CTA_Lower + 1`.
- For each `N` it tries `CTA_Mix = 1, 2, …`, so `CTA_RF` stays as large as
  possible.
- It tests one candidate per clock and takes the first one that passes.
- With 8 slots this takes at most 38 clocks.
- If no candidate passes, the baseline stands: `CTA_Lower` CTAs and no mix CTA.

The results for the fourteen register-limited kernels of the evaluation set
are below. The kernel sizes come from their published resource usage. The
testbench checks every one of them.

| Kernel | Warps/CTA | Regs/thread | Scratchpad/CTA | Baseline | EXPARS (RF + mix) | Start_Reg |
|---|---|---|---|---|---|---|
| LBM | 4 | 36 | 0 | 7 | 8 (6 + 2) | 20 |
| ST | 16 | 29 | 0 | 2 | 3 (2 + 1) | 6 |
| MQ | 8 | 28 | 0 | 4 | 6 (4 + 2) | 8 |
| SGE | 4 | 44 | 512 | 5 | 7 (5 + 2) | 18 |
| BT | 16 | 24 | 0 | 2 | 3 (2 + 1) | 16 |
| HS | 8 | 36 | 3072 | 3 | 4 (3 + 1) | 20 |
| LEUK | 6 | 24 | 0 | 7 | 8 (6 + 2) | 13 |
| MC | 8 | 24 | 2048 | 5 | 6 (5 + 1) | 8 |
| CONV | 6 | 24 | 0 | 7 | 8 (6 + 2) | 13 |
| EST | 8 | 24 | 0 | 5 | 6 (5 + 1) | 8 |
| MERG | 16 | 24 | 8192 | 2 | 3 (2 + 1) | 16 |
| QUA | 12 | 32 | 0 | 2 | 3 (2 + 1) | 21 |
| SING1 | 8 | 24 | 0 | 5 | 6 (5 + 1) | 8 |
| SING2 | 8 | 28 | 0 | 4 | 6 (4 + 2) | 8 |

The average is 5.5 CTAs per SM, against 4.3 for the baseline.

Things to know about this block:

- **HS keeps `CTA_RF` at its baseline value.** The original evaluation reports
  one RF CTA fewer than baseline for HS (and for LBM, LEUK and CONV, which
  match here). For HS, `CTA_RF = 3` plus one mix CTA already meets every
  constraint, so the search keeps it.
- **Whole registers and τ both count.** Take 10 warps per CTA, 32 registers
  per thread and 4KB of scratchpad. Counted in fractions of a register, a fourth
  CTA fits exactly. In whole registers it does not:
  - it could keep only 6 of its 32 registers per thread in the RF;
  - the 26 spilled registers (81%) exceed τ = 0.8;
  - they would also need 49,664 bytes of scratchpad, more than the 48KB.

  The SM therefore stays at 3 CTAs, even with τ = 1.0.
- **The register file holds 32,768 registers** (128KB ÷ 4 bytes).

## Placing registers (`resource_allocator`, `rat`)

After the calculation, the resource allocator loads the register allocation
table (RAT):

| Field | Width | Value |
|---|---|---|
| `Start_CTA` | 3 bits | `CTA_RF`: the first CTA slot that is a mix CTA |
| `Start_Reg` | 6 bits | `k` from above |
| `Max_Reg` | 6 bits | registers per thread − 1 |
| `Warps_Per_CTA` | 6 bits | warps per CTA |
| `SBR[0..7]` | 16 bits each | base of each mix CTA's register region |

`SBR[i]` belongs to CTA `Start_CTA + i`. For a mix CTA with `CTA_ID`:

```
SBR = S − (CTA_ID − Start_CTA + 1) · (Max_Reg − Start_Reg + 1) · Warps_Per_CTA · 128
```

The allocator writes one SBR per clock and then pulses `done`.

### Two-sided scratchpad layout

The register regions grow down from the top of the scratchpad. The CTAs' own
scratchpad regions grow up from address 0, with CTA `c` at `c·S_CTA`. Free
space is always the gap between the two. The allocator flags a configuration
in which they would meet. `cta_calc` never produces one.

### Finding a register

The RAT answers lookups combinationally. The top module uses seven lookup
ports. For warp `W` and register `r`:

```
CTA_ID       = W / Warps_Per_CTA
in scratchpad = (CTA_ID >= Start_CTA) and (r >= Start_Reg)
address      = SBR[CTA_ID − Start_CTA]
             + (Max_Reg − Start_Reg + 1) · (W mod Warps_Per_CTA) · 128
             + (r − Start_Reg) · 128
```

Each warp's spilled registers are contiguous, one 128-byte line each, and the
warps of a CTA follow one another.

One sentence of the original description of the bank arbitrator states the
opposite location test. This design follows the table's definition instead:
"registers from `Start_Reg` up are in scratchpad". The address formula depends
on that definition, through `r − Start_Reg`.

The RAT also returns the register's RF line. That layout is this design's own:

- every RF-CTA warp takes `Max_Reg + 1` lines;
- mix-CTA warps follow, taking `Start_Reg` lines each.

### Scratchpad banking (`scratchpad`)

Word `w` of the scratchpad is in bank `w mod 32`. A 128-byte register line
therefore uses all 32 banks once and moves in a single clock. The scratchpad
has two requesters:

- the register-line port used by the prefetcher;
- a 32-bit word port for ordinary scratchpad accesses.

A line access occupies every bank, so the line port has priority, and a word
access waits (`wd_ready` low) while one runs. Each bank is a single-ported
array with one clock of read latency.

## Operand cache and register prefetching

### Operand cache (`operand_cache`)

The OC has the same 4-bank organisation as the register file, so a register
keeps its compiler-assigned bank:

- bank = `r[1:0]`;
- set = `r[3:2]`;
- each set has one line in every bank, 16 lines in all.

Each line carries a 10-bit tag, plus a pin bit added in this design:

| Field | Bits |
|---|---|
| Warp ID | 6 |
| `r[5:4]` | 2 |
| valid | 1 |
| dirty | 1 |
| pin (this design) | 1 |

Operand reads look at no tag. While a bundle runs, its scratchpad registers
are guaranteed to be in the OC, so a read selects by bank and set only.
Result write-backs do compare the tag and set the dirty bit.

### Bundles and PREF

A bundle is a run of instructions bracketed by `PREF` instructions. The `PREF`
carries a 63-bit vector of the registers the next bundle uses. The prefetcher
(`register_prefetcher`) keeps one vector per warp (48 × 63 bits). From the
vector and the RAT it derives, for each warp, whether the next bundle needs
anything from the scratchpad.

### Warp queues

The warp pool holds every warp in one of three places:

- **schedulable:** its next bundle's registers are all in the RF or the OC;
- **prefetching:** an ordered queue of warps whose scratchpad registers still
  have to be fetched;
- **pending:** over the active-warp limit, or stalled on a long-latency
  operation.

A newly launched warp that needs the scratchpad joins the back of the
prefetching queue. A warp that finishes a bundle and needs the scratchpad for
the next one goes to the *front*, so a running warp is not starved by new
arrivals.

### Prefetch sequence

Every clock in which the prefetcher is idle, it examines the warp at the head
of the queue. The bundle *fits* when each OC line it needs either already
holds the wanted register, or is not pinned. A line is pinned while it belongs
to a bundle that has been prepared and not yet completed.

If the bundle fits, the prefetcher pops the warp and walks its registers, lowest
first:

| Case | Action | Clocks |
|---|---|---|
| hit | pin the line | 1 |
| miss, dirty victim | write the victim line back to its own scratchpad address, found by a second RAT lookup | 1 |
| miss | read the line from the scratchpad | 1 |
| miss | fill the OC (valid, clean, pinned) when the data return | 1 |

It then reports the warp as prepared, and the pool moves it to schedulable, or
to pending if the limit is reached. A bundle with three misses takes 11 clocks
from the pop; one with one hit takes 4.

When the pipeline reports `bundle_done` for a warp, every line pinned by that
warp is unpinned. Its lines stay in the OC, so the warp's next bundle hits if
it reuses them and nobody evicted them in between.

### Limits

If one bundle needs two scratchpad registers that map to the same OC line, it
can never fit. The prefetcher raises `conflict` and leaves the warp at the
head. The register assignment is expected to avoid this: a bundle must not use two
scratchpad registers whose indices differ only in bits 5:4. Full handling of this case is not built.

## Operand reads (`bank_arbitrator`)

Each of the four banks has a read queue, 4 deep. Four request ports present
`(Warp_ID, Reg#)` plus a 4-bit tag. A port is accepted when two things hold:

- its bank's queue has room;
- no lower-numbered port targets the same bank in the same clock.

On entry the request is judged RF or OC using the RAT rule above. Every
non-empty queue grants its oldest entry each clock.

At the top level:

- An RF grant reads the RF line that the RAT supplies.
- An OC grant reads set `Reg#[3:2]` of bank `Reg#[1:0]`.
- The operand appears on `rd_resp_*` two clocks after the request was
  accepted, with its tag and a flag telling where it came from.

Result write-backs (`wb_*`) go to the OC for scratchpad registers and to the RF
otherwise.

## Lazy two-level warp scheduler (`ltlws`)

The inner level issues one warp per clock from the schedulable, unstalled
warps. Two policies are available:

- **GTO (greedy-then-oldest):** keep issuing the last warp while it can, else
  take the lowest warp ID.
- **LRR (loose round robin):** take the next eligible warp after the last one.

A 32-bit counter per warp counts issued instructions. At first there is no
limit on schedulable warps. When the first warp finishes, the scheduler does
three things:

1. It sums the counters of all launched warps, over 48 clocks.
2. It divides once, to get `W_Opt = floor(Σ Inst_i / Inst_Max)`. `Inst_Max` is
   the count of the warp that finished.
3. It applies `W_Opt` as the limit.

The sum is taken while issue continues, so the result lies between the value at
the moment of finishing and the value about 50 clocks later.

After that:

- one excess schedulable warp per clock moves to pending, highest ID first;
- one unstalled pending warp per clock is promoted while there is room, lowest
  ID first.

A stalled warp always goes to pending and comes back through promotion. `lazy =
0` turns the limit off.

## Top module (`expars_sm`)

`expars_sm` wires all of the above together for one SM. The surrounding
pipeline drives it as follows.

1. **Configure.** Pulse `cfg_start` with `regs_per_thread`, `warps_per_cta`
   and `spm_per_cta` held. Wait for `cfg_done`, at most about 50 clocks.
   `cta_total`, `cta_rf` and `cta_mix` then hold the decision, and `spm_base[]`
   holds the ordinary scratchpad region of each CTA slot.
2. **Dispatch warps.** Dispatch `cta_total` CTAs. Warp `W` belongs to slot
   `W / warps_per_cta`. For each warp:
   - send its first `PREF` (`pref_valid/warp/vec`);
   - then, at least one clock later, send `launch_*`.
3. **Run.** `issue_valid/issue_warp` name the warp issued each clock. Operand
   reads go through `rd_*` and results through `wb_*`. Long-latency waits are
   reported with `stall_*` and `unstall_*`.
4. **End a bundle.** Send the next bundle's `PREF` (an all-zero vector after the
   last one), then `bundle_done_*`, then `finish_*` when the warp is done.
5. **Ordinary scratchpad traffic** uses `spm_*` and yields to register lines.

Status outputs:

- prefetch counters: fills, hits, write-backs, waiting clocks;
- scheduler counters: demotions, promotions;
- scheduler state: `W_Opt`, active warp count, prefetching-queue length.

## Verification

Each block has a self-checking testbench in `tb/`. All run at the default
sizes.

| Testbench | What it checks |
|---|---|
| `tb_cta_calc` | the 14 kernels above (totals, split, `Start_Reg`, τ, clocks); the 10-warp example; a scratchpad-limited kernel; 63 registers per thread at τ = 1.0 and 0.8 |
| `tb_resource_allocator` | RAT fields and SBRs against the formulas (e.g. MQ: 28,672 and 8,192); no-mix case; overlap flag |
| `tb_rat` | random configurations and lookups against an independent formula model |
| `tb_bank_arbitrator` | random traffic against a reference queue model: acceptance, grant order, RF/OC judgement |
| `tb_operand_cache` | random fills, pins, unpins, writes and reads against a model |
| `tb_scratchpad` | random line and word traffic, line-port priority, banking |
| `tb_register_file` | random multi-port reads and writes |
| `tb_register_prefetcher` | with a real RAT, OC and scratchpad: fills, waiting on pins, dirty write-back to the right address, hits, clock counts |
| `tb_ltlws` | queue order (including push-to-front), LRR rotation, GTO stickiness, stalls, `W_Opt` value, demotion and promotion |
| `tb_expars_sm` | end to end at full size (see below) |

### The end-to-end test

`tb_expars_sm` configures an MQ-like kernel, giving 6 CTAs (4 RF + 2 mix),
`Start_Reg` 8 and SBRs 28,672 and 8,192. It launches all 48 warps. The
testbench plays the pipeline: it stalls each warp at the end of a bundle, then
reads its operands, checks them against a register model, writes results and
moves to the next bundle.

It checks:

- a mix warp is only issued while its scratchpad registers are valid and pinned
  in the OC;
- each operand comes from the right storage;
- values survive the whole round trip: written into the OC, evicted, written
  back, fetched again.

At the end it reads the written-back lines through the word port, at addresses
computed independently from the formula above.

It also counts each mechanism and fails if any of them never happened: fills,
hits, dirty write-backs, waits for pinned lines, OC and RF reads and writes,
word accesses held off by line traffic, demotions, promotions and `W_Opt`.

### Running the tests

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert --top-module tb_expars_sm \
    -y rtl -y tb +libext+.sv -Irtl rtl/expars_pkg.sv tb/tb_expars_sm.sv
./obj_dir/Vtb_expars_sm +verilator+rand+reset+2
```

Replace the testbench name for the others. All of them build with Verilator's
default warnings and none is raised. Every testbench ends with a line
`TB_RESULT checks=N failures=M`. The end-to-end run takes a few seconds.

## Where this design goes beyond the original description

- **CTA search:** a per-clock search instead of the closed-form expressions,
  and whole-register rounding of `Start_Reg`. One consequence: the 10-warp,
  32-register example reaches 4 CTAs only when registers are counted in
  fractions; here it stays at 3 (see above).
- **When a warp re-enters the prefetch queue:** one description says after its
  bundle has been scheduled, another says after the bundle completes. This
  design waits for completion (`bundle_done`), so the bundle's OC lines stay
  pinned until its instructions have read them.
- **OC pin bit:** defines what "enough free space in the OC" means.
- **Timings and depths** are this design's own: the prefetch sequencing, queue
  depths, lookup-port counts, read latencies and the demotion/promotion rate.
- **Register-file line layout** is this design's own.
- **Reduced parts of the SM:** the register file is one array of lines with one
  read port per bank. The scratchpad's ordinary side is a single 32-bit word
  port, not the full 32-lane access path.
- **Not built:**
  - the compiler side: register reordering by reference weight, bundle
    formation, `PREF` insertion;
  - the GPU-level CTA scheduler that spreads CTAs over SMs;
  - the SIMT pipeline itself.

  They appear only as the ports described above.
