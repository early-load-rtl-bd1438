# Early load: starting loads while they wait in the instruction queue

In a deep in-order pipeline a load needs several cycles between decode and the
moment its value can be forwarded. An instruction that uses the loaded register
stalls for all of those cycles: this is the load-to-use latency. In a
12-stage pipeline it is about five cycles. Out-of-order issue would hide it,
but that costs too much for an embedded core.

Early load is a cheaper fix. In a decoupled front end, instructions usually
sit in the instruction queue for a few cycles between fetch and decode. During
that time:

1. the fetch stage spots loads of the form `LDR Rd, [Rn, #±imm]`;
2. a small *early load queue* (ELQ) records them in program order;
3. when the load/store unit (LSU) has a free cycle, the oldest such load reads
   its base register, forms its address and fetches its data into the ELQ;
4. when the load reaches decode with its data already in the ELQ, it does not
   access the cache again. Its destination register is *renamed* to the ELQ
   entry, so dependent instructions read the value from there and do not
   stall.

An early load may use a stale base register or read memory that an older store
has not yet written. Such early loads are never started, or they are
invalidated before their load reaches decode. A load whose early data is
invalid simply executes normally. A wrong early load therefore costs nothing
beyond the cache access it used.

This repository holds synthesizable SystemVerilog for the early-load unit.
This is the logic added to the host pipeline: pre-decoders, instruction queue
with a lookahead pointer, early load queue, register status table, and the
avoidance/invalidation checks. It also holds self-checking testbenches,
including an end-to-end test in a model of a dual-issue host pipeline. The
scheme follows the thesis *Early Load: Hiding Load-to-Use Latency in Deep
Pipeline Processors*. The host processor itself (decoder, register file,
forwarding, ALUs, caches, LSU) is not part of this RTL. The unit connects to
it through plain ports.

## The parts and how they connect

```
        I-cache ways ──► el_predecode_select ──► el_iq (24 entries) ──► host decode
        (data, hit)          │  candidates          │ lookahead pointer   │  dst regs, latency,
                             ▼                      ▼  (activate)         │  store?  ─────┐
                        el_elq (12 entries) ◄───────┘                     ▼               │
          host RF ◄── base reg read ─┤  ◄── start/avoid ──── el_violation_check ◄─────────┤
          host LSU ◄── request ──────┤  ◄── invalidate ────┘   ▲ store address            │
                   ──► response ─────┤                         │                          │
                                     └── early data at decode ─┴──► el_rst (16 regs) ◄────┘
                                                                     ready / busy / rename
```

| file | block |
|------|-------|
| `rtl/el_pkg.sv` | shared types: ELQ entry, RST entry, pre-decode result, queue entry, event flags |
| `rtl/el_predecoder.sv` | decodes one ARM word: is it an early-load candidate? |
| `rtl/el_predecode_select.sv` | one pre-decoder per cache way and fetch slot, selected by the tag hit |
| `rtl/el_iq.sv` | instruction queue with the early-load lookahead pointer |
| `rtl/el_elq.sv` | early load queue: allocate, activate, start, complete, decode lookup, commit |
| `rtl/el_rst.sv` | register status table: ready / busy (with countdown) / renamed to an ELQ entry |
| `rtl/el_violation_check.sv` | avoidance (case 1) and the two invalidations (cases 2 and 3) |
| `rtl/early_load_top.sv` | the unit: all of the above, plus the decode-group and store-ordering rules |

### Candidates and pre-decoding

A candidate is an ARM single-data-transfer load (`LDR`/`LDRB`) with these
properties:

- immediate offset, up or down;
- pre-indexed, without base write-back;
- condition "always";
- neither base nor destination is R15.

Register-offset loads are left out because their address can rarely be
computed early. Conditional loads are left out to keep the logic simple.

Loads must be found before they enter the queue, and the fetch cycle must not
get longer. So every cache way has its own pre-decoders, which work on that
way's data while the tags are compared. The one-hot hit vector then selects
both the instruction words and the pre-decode results, in the same way.

### The lookahead pointer and the moment to start

An early load started too soon is likely to find its base register not yet
computed. One started too late is not finished when the load reaches decode.
The instruction queue has a lookahead pointer a fixed distance `EL_DIST`
behind its head (default 4). A load's ELQ entry becomes *active* once the load
is within that distance of the head.

The head can advance by two per cycle, and a load can be pushed in behind the
pointer when the queue is nearly empty. For these reasons the queue activates
every candidate at distance 0..`EL_DIST` each cycle, rather than only the one
under the pointer. The Active bit is sticky.

### Life of an ELQ entry

| step | event | status |
|------|-------|--------|
| 1 | allocated at the tail when the candidate is pushed into the queue | prepare, not active |
| 2 | lookahead pointer reaches the load | prepare, active |
| 3 | LSU idle, entry is the oldest active one in prepare: base read, address `Rn ± imm` formed, request sent | busy |
| 3' | same, but the base register is busy in the RST (case 1) | invalid, not started |
| 4 | response with data (cache hit) | complete |
| 4' | response with a cache miss | invalid |
| – | case 2 or case 3 while busy or complete | invalid |
| 5 | load reaches decode: complete → data used, destination renamed; otherwise the load executes normally | – |
| 6 | load commits | entry freed at the head |

The queue has three pointers:

- `head`: the oldest entry, freed at commit;
- `dec`: the next entry whose load reaches decode;
- `tail`: the next free entry.

The entries from `dec` to `tail` are *pending*. Only pending entries are
started or invalidated.

The base value comes from the host's register file through `el_rf_raddr` /
`el_rf_rdata`. If the RST says the base register is renamed, the value comes
from the ELQ instead. This makes pointer chasing work: a load whose base was
itself early-loaded can start at once.

When the ELQ is full, a candidate goes into the instruction queue without an
entry and executes normally.

### Keeping early data correct

This is the subtle part. An early load is wrong in two ways:

- **Base register dependency.** An older instruction has not yet produced the
  base register, so the early load used an old value.
- **Memory dependency.** An older store writes the location the early load
  read.

The register status table (RST) has one entry per register R0..R15:

- a status: ready, busy, or rename;
- the ELQ entry a renamed register points at;
- a countdown, 3 bits wide by default (`STAGE_W`).

An instruction passing the decode point marks the registers it writes busy,
with the countdown set to its execution latency. After that many cycles the
register is ready again, and the host must have written it back by then. A
load that uses early data marks its destination *rename* instead. The
register returns to ready when that load commits.

On top of this bookkeeping, `el_violation_check` applies three rules:

1. **Avoidance.** Before an early load starts, its base register is looked up.
   If the register is busy, the entry is marked invalid and never sent.
2. **Invalidation by register.** Each register written by an instruction
   passing decode is compared with the base register of every pending entry
   that has started (busy or complete). Matching entries are marked invalid.
   This catches a producer that was still in the instruction queue, ahead of
   the load, when the early load read the register file.
3. **Invalidation by store.** When a store presents its address, it is
   compared per 32-bit word with the address of every pending entry that has
   started. Matching entries are marked invalid.

An early load starting in the same cycle counts as started for rules 2 and 3.

Rules 2 and 3 only see instructions at decode and stores at their access.
That leaves three windows, which `early_load_top` closes with rules of its own:

- **Store between decode and its access.** A store has passed decode but not
  yet reported its address. A counter (`st_pend`) tracks such stores, and
  while it is non-zero no load at decode may use early data: a store still in
  flight could hit the same word. The load executes normally, which is always
  correct.
- **Same decode group, register.** In one decode group, if the older slot
  writes the younger load's base register, the younger load does not use its
  early data. Rule 2 fires in the same cycle, too late for that lookup.
- **Same decode group, store.** If the older slot is a store, the younger load
  does not use its early data either.

The host must also meet two conditions:

- It reports a store's address in the cycle the store accesses the LSU.
- The LSU serves accesses in order. An early load started after a store then
  sees the stored data.

## Interface to the host pipeline

All outputs are combinational on the registered state and the current inputs.
All state changes at the rising edge of `clk`. Reset is synchronous and active
low (`rst_n`).

| group | ports | meaning |
|-------|-------|---------|
| fetch | `fetch_valid`, `fetch_cnt`, `way_data[WAYS][FETCH_W]`, `way_hit[WAYS]`, `fetch_ready` | a fetch group is pushed when valid, a way hits and `fetch_ready` (room for a whole group) |
| decode | `dec_entry[2]`, `dec_valid[2]`, `dec_cnt` | the host pops `dec_cnt` instructions; each entry holds the word and its ELQ tag |
| | `dec_dst_mask[2]`, `dec_lat[2]`, `dec_is_store[2]` | in the same cycle: registers written, execution latency (1..7), store flag |
| | `dec_el_hit[2]`, `dec_el_data[2]` | for a candidate load: use this data, skip the cache access |
| operands | `rd_reg[4]` → `rd_status[4]`, `rd_el_data[4]` | status of a source register; value if renamed |
| early loads | `el_rf_raddr` → `el_rf_rdata` | base register read |
| | `lsu_idle`, `req_valid`, `req_addr`, `req_byte`, `req_tag` | request, only in a cycle the host leaves the LSU idle |
| | `rsp_valid`, `rsp_tag`, `rsp_data`, `rsp_hit` | response, any later cycle, matched by tag |
| stores | `st_valid`, `st_addr` | store address, in the cycle of the store's LSU access |
| commit | `commit_cnt` | number of candidate loads (those with `el_cand` set) committing, in order |
| control | `el_enable`, `flush` | `el_enable` low: no candidates, baseline behaviour; `flush` empties the queue and drops pending ELQ entries |
| status | `events` | one flag or count per mechanism per cycle, for performance counters |

The request tag is the entry index plus an epoch bit that toggles on every
allocation. A response for an entry freed by a flush therefore changes
nothing.

A register write-back of latency L given at decode in cycle t must be visible
in the register file from cycle t+L+1. The load that used early data must
write its value back when it commits.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `WAYS` | 4 | I-cache ways, each with its own pre-decoders (32 KB 4-way cache of the evaluated core) |
| `FETCH_W` | 2 | fetch and decode width |
| `IQ_DEPTH` | 24 | instruction queue entries |
| `EL_DIST` | 4 | early-load distance; 1..7 were evaluated, 4 was best on average |
| `ELQ_DEPTH` | 12 | ELQ entries; 4, 8, 12 and 16 were evaluated. The 4-bit ELQ index allows up to 16 |
| `N_RD` | 4 | operand status lookups (two sources for each of two slots) |
| `STAGE_W` | 3 | RST countdown width (`Stage[2:0]`): execution latencies up to 7. Default taken from `el_pkg::STAGEW` |

With a 3-bit countdown, the unit covers the 8- and 12-stage pipelines the
scheme was evaluated on. Their load-to-use latencies are 3 and 5 cycles. The
20-stage variant has an 8-cycle latency. It needs `STAGE_W = 4`, and the
host's `dec_lat` port then widens to match.

## Where this RTL departs from the original description

- **Address adder in the ELQ.** In the original organisation, the early-load
  register read feeds the pipeline's own address unit. Here the ELQ adds
  `Rn ± imm` itself. The address is then recorded while the access is in
  flight, which rule 3 needs. This costs one 32-bit adder.
- **One-cycle start.** The base register read and the request happen in the
  same cycle. The original places a pipeline register between the early-load
  register read and the address unit.
- **Decode point.** The decode point of the mechanism is the cycle the host
  pops the instruction queue. The original describes it as a decode stage
  without naming which of the three.
- **Extra hazard rules.** The rules for stores between decode and access, and
  for hazards inside one decode group (see above), are this design's own.
- **Excluded addressing modes.** Pre-indexing without write-back, and the
  R15 exclusion, are this design's choices.
- **Encodings and details.** The numeric codes of the status values, the
  `{P,U,B,W}` layout of the addressing mode, the flush behaviour and the
  epoch tag are this design's choices.
- **Not built.** Two things are left out. The alternative checking method
  (re-execute every load, compare, and flush on a mismatch) was only
  discussed. Retrying an invalidated entry was not described.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `el_predecoder_tb` | hand-encoded cases (LDR, LDRB, negative offset, write-back, post-index, condition NE, STR, register offset, PC) and 4000 random words against a reference decoder |
| `el_predecode_select_tb` | random way contents and hit vectors, including misses |
| `el_iq_tb` | 6000 cycles of random push/pop against a queue model: head entries, free count, lookahead activations, full queue, flush |
| `el_rst_tb` | a write of latency 5 is busy for exactly 5 cycles; 5000 random cycles against a model |
| `el_violation_check_tb` | the three cases on the textbook examples and 5000 random cases against a reference |
| `el_elq_tb` | an entry's whole life in directed steps (oldest-first selection, miss, full queue, flush, stale response), then 6000 random cycles against a reference model of the queue |
| `early_load_top_tb` | the whole unit, default parameters, in a host-pipeline model (below) |
| `early_load_sweep_tb` | the whole unit in twelve evaluated configurations, one program (below) |

Both end-to-end testbenches drive the unit from `el_host_model`, a
behavioural model of a dual-issue in-order host:

- a scoreboard on the RST;
- ALU latency 2, load latency 6;
- an LSU that accepts one access per cycle, takes 4 cycles for early loads
  and misses 8% of them;
- 5% of LSU cycles taken by other traffic;
- random I-cache misses, and decoy words in the ways that miss.

A golden model executes each instruction in program order at decode. Checked
against it: every operand read, whether from the register file, from the ELQ
through a rename, or forwarded from an early-data load in the same group; and
every early-loaded value used at decode. Final registers and memory must
match.

`early_load_top_tb` runs three programs:

- **Load-use example** (a load, then an add that uses it). With early load
  the add is decoded in the same cycle as the load. Without it, 7 cycles
  later.
- **Random program** of 1500 instructions, with pointer bumps, pointer
  chasing, store-then-load pairs and bursts of loads. Each mechanism must
  occur at least once: allocation, ELQ full, activation, start, waiting for
  the LSU, avoidance, both invalidations, completion, cache miss, use at
  decode, fallback, store hold, renamed operand, renamed base, and use in the
  same decode group. Every candidate that entered the ELQ must reach decode
  either using early data or falling back. The log breaks the decoded loads
  down into those using early data (about 18% here), register-offset loads,
  and the rest. The run with early load takes about 3% fewer cycles than
  the run without. This figure depends entirely on the synthetic program and
  host model; it is not a benchmark result.
- **Same program with flushes.** The front end is flushed every 97 cycles, as
  after a mispredicted branch. Fetch restarts at the oldest instruction not
  yet decoded. Every early load not yet decoded is dropped, and responses
  still in flight for them are discarded by their epoch tag. Results must
  still match the golden model.

`early_load_sweep_tb` builds one unit and one host per configuration. All of
them run the same seeded random program (1200 instructions), with early load
on and off:

- ELQ sizes 4, 8, 12 and 16, at distance 4;
- distances 1 to 7, with a 16-entry ELQ;
- load-to-use latencies of 3, 5 and 8 cycles, with 12 entries and distance 4.
  These are host load latencies of 4, 6 and 9 cycles, and the 8-cycle case
  uses `STAGE_W = 4`.

Every run is checked against the golden model. The sweep also requires three
trends:

- a 16-entry ELQ uses early data more often than a 4-entry one;
- distance 7 uses early data more often than distance 1;
- the speed-up at 8 cycles exceeds the speed-up at 3.

On this program, the fraction of cycles saved grows from about 0.8% with 4
entries to 4.9% with 16. Over distances 1 to 7 it grows from 1.0% to 5.7%.
Over load-to-use latencies of 3, 5 and 8 cycles it is 2.2%, 3.1% and 4.8%.
The table is printed in the log. The synthetic program has none of the array
loops of real benchmarks, so the best distance it shows differs from the 4
found on real code.

## Simulating

With Verilator 5 (files found by module name through `-y`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/el_pkg.sv tb/el_tb_pkg.sv tb/early_load_top_tb.sv --top-module early_load_top_tb
./obj_dir/Vearly_load_top_tb
```

Replace `early_load_top_tb` with any other testbench name to run that block
alone, or with `early_load_sweep_tb` for the configuration sweep. Both
end-to-end tests run in well under a minute. `tb/el_host_model.sv` is found
through `-y tb`. For lint, run
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/el_pkg.sv rtl/early_load_top.sv`.
The remaining warnings are unused-bit and unused-constant notes. For example, the
store address compare uses whole words, so address bits 1:0 are unused. None is a latch, loop
or multiple-driver warning.
