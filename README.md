# Enhanced Memory Controller (EMC): running dependent cache misses at the memory controller

In a pointer-chasing program, a load that misses the last-level cache (LLC)
often feeds the address of a second load that also misses. The core can do
nothing about the second miss until the first one's data has come from DRAM,
crossed the on-chip interconnect, filled the cache hierarchy and woken the
dependent uops. Only then does it send the second request back out. Between
the two misses there are usually only a handful of simple integer uops: a
move, an add of a field offset, perhaps a sign extension.

The Enhanced Memory Controller moves those few uops to where the data
arrives. When a core is stalled on an LLC miss, it cuts the uops that depend
on that miss out of its instruction window. The core then ships them as a
short *chain* to a small out-of-order engine at the memory controller. The
engine picks up the missing data the moment DRAM returns it. It computes the
next address and issues the dependent load itself, without the core's round
trip in the way. Finally it sends the results (*live-outs*) back to the core.
The core still retires everything in order. Anything unusual (a mispredicted
branch, a missing translation, a memory-ordering conflict) makes the core
throw the chain's results away and run the uops itself.

This repository holds synthesizable SystemVerilog for the EMC side of a
quad-core system:

- the chain generation unit and dependent-miss counter of each core;
- the chain arbiter;
- the EMC compute engine with its contexts, reservation station, ALUs, LSQs,
  data cache, TLBs and LLC-miss predictor.

The cores, LLC, ring interconnect, memory scheduler and DRAM are not part of
it. Their side of each connection is a port.

## The system at a glance

```
 core 0..3                                   memory controller
 +--------------------------+                +----------------------------------------+
 | window, PRF, ready bits  |                | emc_engine                             |
 |  |                       |   chains       |  context 0  context 1                  |
 |  v                       |  +---------+   |  uop buf    uop buf    8-entry RS      |
 | chain_gen <- dep_miss_   |->| round-  |-->|  PRF        PRF        2 ALUs, CDB     |
 |   (RRT, live-in vector)  |  | robin   |   |  live-ins   live-ins   TLB (32/core)   |
 |                          |  +---------+   |  LSQ        LSQ        4 kB D-cache    |
 |  <- live-outs, status, memory messages ---|                        miss predictor  |
 +--------------------------+                +----------------------------------------+
                                                   ^ DRAM lines   | LLC / DRAM requests
```

`emc_top` instantiates, per core, a `dep_miss_counter` and a `chain_gen`,
then a round-robin arbiter, then one `emc_engine`. Defaults: 4 cores,
2 contexts, 256-entry windows.

## Deciding to build a chain

A chain is only worth building when the miss blocking the core is likely to
have a dependent miss behind it. Each core keeps a 3-bit saturating counter
(`dep_miss_counter`). The core raises `dm_inc` when an LLC miss turned out to
have a dependent LLC miss, and `dm_dec` when it did not. The counter says
`likely` while either of its two upper bits is set, i.e. at a count of 2 or
more. After reset it is 0, so no chains are built until dependent misses
have been seen.

Chain generation starts when all of these hold:

- `stall_miss` is high: the window is full and an LLC miss sits at its head;
- `likely` is high;
- the window head is a load with a destination.

## Building a chain: the forward walk (`chain_gen`)

This is the least obvious part of the design. The core presents its window
with the source miss at index 0. Every entry has:

- the operation;
- the destination and source core physical registers (CPRs);
- an immediate;
- the low PC bits;
- the predicted direction of a branch;
- a `spill` flag.

The unit also sees the core's register ready bits and two read ports into the
core's register file.

The walk works like a wakeup that only the chain can trigger:

- **Cycle 0.** The source miss's destination CPR gets EMC register E0 in the
  register remapping table (RRT, `emc_rrt`). Its tag is broadcast on the
  core's tag bus (`pb_vld`/`pb_tag`), a "pseudo wakeup". In the same cycle
  the oldest uop that this wakes joins the chain as the second uop.
- **Each later cycle.** The unit scans the window for the oldest uop that
  meets four conditions:
  1. It is not yet in the chain.
  2. The EMC can run it.
  3. Each of its sources is either ready at the core or already mapped in the
     RRT.
  4. At least one source is mapped, meaning the chain woke it.

  That uop joins the chain as follows:
  - Mapped sources become EMC registers.
  - Ready sources are read from the core register file and appended to the
    live-in vector (`livein_vector`). Immediates are appended too.
  - The destination gets the next EMC register.
  - Its tag is broadcast, which may wake further uops.
- **End.** The walk stops when any of these happens:
  - nothing more wakes up;
  - the chain holds 16 uops;
  - the next uop would need a 17th live-in, a 17th EMC register or a ninth
    load/store (the LSQ has eight entries).

  The finished chain is offered to the arbiter in the following cycle. It
  goes together with the live-in values, the source miss's physical address
  and, if the core's TLB bit says the EMC does not hold that page, the
  source page's translation.

The EMC runs these uops:

- integer add, subtract, move, and, or, xor, not, shifts and sign-extend;
- loads;
- branches, sent with the core's predicted direction;
- stores that the core's LSQ identified as register spills.

Floating-point and vector uops (`OP_OTHER`) never enter a chain, and neither
does anything that depends on them. A load flagged as the fill of a spill
joins once a spill store is in the chain, even though its own address
register is ready at the core. Its data then comes from the store through
the EMC's LSQ. A source miss that wakes nothing produces no chain.

Example, the pointer chase the testbenches use (core registers C*n*):

| window | uop                 | chain | EMC form         | cycle added |
|-------:|---------------------|-------|------------------|------------:|
| 0      | C1 <- load [C8]     | yes   | E0 (source miss) | 0           |
| 1      | (unrelated)         | no    |                  |             |
| 2      | C9 <- C1            | yes   | E1 <- E0         | 0           |
| 3      | (unrelated)         | no    |                  |             |
| 4      | C12 <- C9 + 0x18    | yes   | E2 <- E1 + L0    | 1           |
| 5      | C10 <- load [C12]   | yes   | E3 <- [E2]       | 2           |
| 6      | C16 <- C10 + 4      | yes   | E4 <- E3 + L1    | 3           |
| 7      | C19 <- load [C16]   | yes   | E5 <- [E4]       | 4           |

The live-ins are L0 = 0x18 and L1 = 4. The chain is offered in cycle 5.

The uop as stored in the EMC is 38 bits (`euop_t`):

- operation;
- destination EMC register;
- two sources, each either an EMC register or a live-in index;
- predicted branch direction;
- an 8-bit PC hash;
- the uop's ROB position.

An elaboration-time check keeps it within 6 bytes.

## Running a chain (`emc_engine`)

### Contexts

Each context holds one chain:

- `emc_uop_buffer`: 16 uops;
- `emc_prf`: 16 registers with ready bits;
- `livein_vector`: 16 live-ins;
- `emc_lsq`: 8 load/store entries.

A chain is accepted (`ch_rdy`) whenever a context is idle. Acceptance loads
the whole chain in one cycle. It clears the PRF and LSQ, and writes the
translation sent with the chain into the home core's TLB.

The context then needs the source data. Its first data cache access is a
probe for the source miss's line. Every line from DRAM is written into the
data cache, so the probe hits if the line arrived before the chain did.
Otherwise the context watches `df_*`, where every line arriving from DRAM is
presented, until the source line passes by. Either way, the addressed 64-bit
word is written into the source's EMC register and the chain starts. If the
line has already been evicted from the 4 kB cache when the chain arrives, the
context waits until the core cancels it.

### Dispatch, issue, execute

| cycle | what happens |
|---|---|
| dispatch | one context per cycle (alternating when both run) moves up to two uops, in order, from its buffer into the shared 8-entry reservation station (`emc_rs`); loads/stores also get LSQ entries, allocated in program order |
| issue | the RS picks the two lowest-numbered entries whose sources are ready; operands are read from the PRF or live-in vector |
| execute | `emc_alu` computes the result, the branch outcome, or a load/store address; the TLB (`emc_tlb`) translates addresses in the same cycle |
| broadcast | the registered result is written to the PRF and its tag wakes RS entries |

The common data bus has three ports:

- port 0 for ALU 0;
- port 1 for ALU 1;
- port 2 for load data written back by an LSQ.

A woken uop can issue, at the earliest, in the cycle after the broadcast that woke it.

### Loads and stores

An address goes into its LSQ entry after translation. A store finishes as
soon as it has its address and data. A load must wait until every older
store in its chain knows its address. Then:

1. **Forwarding.** If the youngest older store writes the same 8-byte word,
   the load takes that store's data.
2. **Data cache.** Otherwise the load asks `emc_dcache`: 4 kB, 4 ways,
   64-byte lines, one port. It answers two cycles after it accepts a
   request. The cache holds lines recently delivered from DRAM and fills
   from `df_*`, with first-in first-out replacement in each set. The LLC
   directory invalidates lines through `inv_*`. A fill takes the port ahead
   of a lookup.
3. **LLC or DRAM.** On a data cache miss the per-core LLC-miss predictor
   (`emc_miss_pred`) is consulted. It has 256 3-bit counters, indexed by the
   uop's PC hash.
   - If the counter is above 3, the request goes straight to the memory
     controller (`mc_req_*`) and the line returns on `df_*`.
   - Otherwise it goes to the LLC (`llc_req_*`). The tag sent with the
     request holds the PC hash, the context and the LSQ entry, and it comes
     back in the response. A hit returns the line in the response. A miss
     means the LLC forwarded the request to DRAM, and the line comes later
     on `df_*`. Each LLC response trains the predictor: a miss counts up, a
     hit counts down.

Several loads of a context can wait for memory at once. Loaded values go out
on CDB port 2, oldest first. Every executed load and store also sends a
message to its core on `mx_*`, with its ROB position, physical address and
kind. This lets the core's LSQ check memory ordering.

Stores are never written to memory by the EMC. Their data goes back to the
core, which makes them visible in program order.

### Finishing

A chain is done when three things hold: its buffer is empty, no uop of it is
in flight, and every LSQ entry is done. The context then returns live-outs,
one per cycle, on the `lo_*` valid/ready port:

1. every EMC register the chain wrote, in register order;
2. every store, with its address and data.

The core maps EMC registers back to its own registers with the RRT it kept.
Finally `cd_vld` reports the status: 0 completed, 1 branch mispredicted,
2 TLB miss, 3 cancelled.

### Exceptions

Three events stop a context:

- a branch whose computed direction differs from the one the core predicted;
- a load or store whose page is not in the EMC TLB;
- `cancel_vld` from the home core, for example on a memory-ordering
  conflict.

The context's RS entries and buffer are flushed. It waits three cycles so
that cache responses already in flight drain, then reports the status
without sending any live-outs. The core re-executes the chain itself. The
EMC cannot continue down the correct path of a branch.

### TLB

Each core has a 32-entry, fully associative TLB at the EMC, filled as a
circular buffer. A translation sent with a chain is inserted unless it is
already present. A shootdown (`sd_*`) removes a core's entry for a page.
Pages are 4 kB.

## Parameters

Sizes live in `emc_pkg`. Module parameters default to them.

| parameter | default | meaning |
|---|---|---|
| `NCORES` / `N_CORES` | 4 | cores sharing the EMC |
| `NCTX` / `N_CTX` | 2 | contexts (chains in flight) |
| `CHAIN_MAX` | 16 | uops per chain, uop-buffer entries |
| `NEPR` | 16 | EMC registers per context |
| `NLIVEIN` | 16 | live-ins per context |
| `NLSQ` | 8 | LSQ entries per context |
| `NRS` | 8 | reservation-station entries |
| TLB entries | 32 per core | `emc_tlb` `ENTRIES` |
| data cache | 4096 B, 4 ways | `emc_dcache` `SIZE_B`, `WAYS` |
| dependent-miss counter | 3 bits | `dep_miss_counter` `W` |
| miss predictor | 256 x 3 bits per core, threshold 3 | `emc_miss_pred` |
| `ROB_N` / `WIN` | 256 | window entries the walk examines |
| `NCPR` | 256 | core physical registers |
| data, VA, PA | 64, 48, 40 bits | `XLEN`, `VA_W`, `PA_W` |

The core number is a 2-bit field (`CORE_W`, derived from `NCORES`). An
eight-core system therefore needs `NCORES = 8` in the package, not just a
parameter override on the top.

## How closely this follows the published EMC proposal

These come from the proposal:

- the trigger;
- the 3-bit dependent-miss counter and its top-two-bits rule;
- the pseudo wakeup walk with the RRT and the live-in vector;
- the 16-uop limit;
- two contexts with the structure sizes above;
- 2-wide out-of-order issue through an 8-entry reservation station with tag
  broadcast;
- executing register spills and fills;
- the 4 kB, 4-way, 2-cycle data cache of lines arriving from DRAM;
- 32-entry circular TLBs per core with the translation shipped alongside the
  chain;
- the per-core PC-indexed 3-bit miss predictor that sends predicted misses
  straight to DRAM;
- live-out return including store data;
- memory messages to the home core;
- the halt on mispredictions and TLB misses.

These are this design's own choices:

- the uop and operation encoding, and the data and address widths;
- the three CDB ports and the one-cycle ALU;
- dispatch alternating between contexts, and selection of the lowest ready
  RS entries;
- one uop added per walk cycle after cycle 0, oldest first;
- the extra walk stop conditions for live-ins, EMC registers and LSQ entries;
- dropping a source miss that wakes nothing;
- FIFO replacement in the data cache;
- the predictor's size (256 entries), its threshold (above 3), its PC hash
  (XOR of the two low PC bytes), and training only on LLC responses to EMC
  loads;
- round-robin chain arbitration;
- the three-cycle abort drain;
- all handshakes (valid/ready) and status codes;
- asynchronous active-low reset.

## Not implemented

- The cores, including the core-side changes: the LSQ snooping of EMC memory
  messages, the disambiguation check that raises cancel, the spill/fill
  search that sets the `spill` flags, and the EMC-resident bit in the core
  TLB. These enter the design as inputs.
- The LLC and its directory bit for lines held by the EMC, the ring
  interconnect, the batch-scheduling memory controller and DRAM.
- The eight-core variants: one EMC with four contexts serving eight cores,
  or two EMCs that send requests directly to each other on cross-channel
  dependencies.
- EMC exceptions other than TLB miss and branch misprediction. The proposal
  names them but gives no cause.
- Page-table walks at the EMC. A missing translation always returns the
  chain to the core.

## Known limitations

- The source line must either still be in the EMC data cache when its
  chain is accepted, or arrive on `df_*` afterwards (see Contexts).
- Store live-outs carry address and data but no ROB position. The core
  matches them to its stores in program order.
- Memory messages (`mx_*`) are plain valid pulses. The receiver must take
  two per cycle.

## Files

| file | contents |
|---|---|
| `rtl/emc_pkg.sv` | sizes, operation enum, uop, chain, tag and RS-entry types |
| `rtl/emc_top.sv` | quad-core EMC subsystem (top) |
| `rtl/chain_gen.sv` | per-core chain generation |
| `rtl/dep_miss_counter.sv` | 3-bit dependent-miss counter |
| `rtl/emc_rrt.sv` | register remapping table |
| `rtl/livein_vector.sv` | live-in vector |
| `rtl/emc_engine.sv` | EMC compute engine |
| `rtl/emc_uop_buffer.sv` | per-context uop buffer |
| `rtl/emc_prf.sv` | per-context register file with ready bits |
| `rtl/emc_rs.sv` | shared reservation station |
| `rtl/emc_alu.sv` | integer ALU |
| `rtl/emc_lsq.sv` | per-context load/store queue |
| `rtl/emc_dcache.sv` | 4 kB data cache |
| `rtl/emc_tlb.sv` | per-core circular TLBs |
| `rtl/emc_miss_pred.sv` | LLC-miss predictor |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_emc_workload.sv` | four cores chasing pointers at once |
| `tb/tb_emc_mix.sv` | two pointer-chasing and two streaming cores |

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. Each one has a watchdog that ends the
run with a failure if it hangs. Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/emc_pkg.sv tb/tb_emc_top.sv --top-module tb_emc_top
./obj_dir/Vtb_emc_top +verilator+rand+reset+2
```

Replace `tb_emc_top` with any other testbench name.

### Full-system test (`tb_emc_top`)

`tb_emc_top` runs the whole subsystem at its default sizes: four cores,
256-entry windows, two contexts. Behavioural models stand in for the cores'
register files, the LLC, the memory controller and DRAM.

In the first round all four cores stall at once:

| core | chain | checked |
|---|---|---|
| 0 | the pointer chase above | all six live-outs |
| 1 | a spill/fill pair and a load of another word of the source line | forwarding, data cache hit, store live-out |
| 2 | a branch the core predicted wrongly | status 1 |
| 3 | a load through a page the EMC does not hold | status 2 |

Four chains compete for two contexts, so the arbiter and the context-full
back-pressure both act. The test checks the acceptance order against
round-robin.

In the second round:

- a chain is cancelled before its data arrives;
- a core with a low counter stalls without building a chain;
- five chains of one core miss the LLC at the same PC, and the fifth load
  goes straight to DRAM;
- a chain whose source line is already in the EMC data cache runs without
  another DRAM fill.

The test counts each mechanism and fails if any never happened:

- chain sent and pseudo wakeup broadcast;
- arbitration conflict and context-full hold;
- LLC hit, and LLC miss with DRAM fill;
- direct memory request;
- data cache hit and store-to-load forwarding;
- register and store live-outs, and memory messages;
- completion, misprediction, TLB miss and cancel;
- a chain suppressed by the counter;
- a source line found in the data cache.

### Pointer-chasing workload (`tb_emc_workload`)

`tb_emc_workload` is a synthetic stand-in for the memory-intensive programs
the EMC targets. It uses the default sizes and runs four cores at once. Each
core makes 24 passes over a two-level linked structure. A pass loads a
pointer, adds a field offset, loads the next node, adds another offset, and
loads a value. One unrelated add sits in the middle and must be filtered out.

- Each node randomly hits or misses the LLC.
- The source line arrives at a random time after the chain is sent.
- In one pass of four, the source line arrives before the core stalls. The
  chain then finds it in the EMC data cache.
- All five live-outs of every pass are compared with the expected values.
- The test fails if LLC hits, LLC misses, direct memory requests or early
  source lines never happened.

### Mixed workload (`tb_emc_mix`)

`tb_emc_mix` pairs two kinds of program on the four cores.

- Cores 0 and 1 run the pointer chase above, 24 passes each.
- Cores 2 and 3 run a streaming loop. Each load miss there feeds only
  floating-point work and independent loads. Their dependent-miss counters
  are trained low.

The test checks three things:

- every chasing pass completes with correct live-outs;
- no streaming stall starts a chain walk or marks a window entry as sent;
- the streaming cores never receive a completion.

### Block tests

- `tb_emc_engine` drives the engine directly with hand-built chains and
  covers the same cases, plus a third chain refused while both contexts are
  busy.
- `tb_chain_gen` checks the example walk cycle by cycle and covers the
  filtering rules and the 16-uop cut.
- `tb_emc_dcache` checks the two-cycle access latency.
- The remaining block testbenches compare against reference models, or
  against sequences worked out by hand.
