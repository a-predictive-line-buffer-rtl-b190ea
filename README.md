# Predictive line buffer instruction cache with key-instruction-trace prediction

A line buffer is a single cache line held in registers in front of the
instruction cache. When a fetch hits it, the fetch costs far less energy than a
cache access, and the cache arrays stay idle. When it misses, the fetch is slower
and more costly than a plain cache access, because the buffer is checked first
and then reloaded. The whole scheme therefore depends on the buffer's hit ratio.

Within one line, fetches either run in sequence or branch inside the line. Both
keep hitting. Misses come only from the few control transfers that leave the
line: a taken branch to another line, or running off the end of a line. This
design calls such a transfer a **key instruction trace (KIT)**. It records each
KIT when it first causes a miss. Later, when the fetch unit reaches the KIT's
start instruction again, it copies the target line from the cache into the line
buffer before the next fetch arrives, so that fetch hits. Only the transfers
between lines are stored, not the whole instruction trace. A small table
therefore covers loops of any length.

The RTL is a complete instruction-fetch front end for a 32-bit core, with these
default sizes:

| item | default |
|---|---|
| L1 instruction cache | 16 KB, 4-way set associative, 64-byte lines (64 sets) |
| line buffer | one 64-byte line (16 instructions of 32 bits) |
| Instruction Trace Table (ITT) | 8 KITs, as 4 sets × 2 ways, FIFO replacement |
| address / instruction | 32 bit / 32 bit |

## Structure

```
            req_addr ──┬──────────────┬───────────────┐
                       ▼              ▼               │
                 line_buffer         itt              │
              (tag,index,data)  (start addr → CLA)    │
                 ▲     │ hit        │ hit, CLA        │
  line at CLA ───┘     ▼            ▼                 ▼
                 ┌──────────── plb_kitps_cache FSM ─────────┐
                 │  liar (last fetched address = KIT start) │
                 │  clir (way number of the last access)    │
                 └──────────────────────────────────────────┘
                                │ lookup / CLA read / refill
                                ▼
                             icache  ── mem_req / mem_rdata ──► memory
```

| file | block |
|---|---|
| `rtl/kitps_pkg.sv` | default sizes, lookup-case and FSM-state enums |
| `rtl/plb_kitps_cache.sv` | top: fetch controller, wires all blocks |
| `rtl/line_buffer.sv` | one-line buffer, address compare, word select |
| `rtl/itt.sv` | Instruction Trace Table |
| `rtl/liar.sv` | Last Instruction Address Register |
| `rtl/clir.sv` | Cache Line Index Register with its one-hot-to-binary encoder |
| `rtl/icache.sv` | set-associative cache: tag/data arrays per way, lookup, CLA read, refill |

## Naming a cache line: the CLA

A KIT has to name its target line cheaply. It does so with the line's
position in the cache, not its address. The **cache line address (CLA)** is
`{set index, way}`: 6 + 2 = 8 bits by default, against the 26 bits of a
line address. The set index comes from the fetch address. The way comes from
the cache access itself. Each access selects exactly one wordline (one way of
the set), and the **CLIR** turns that one-hot wordline vector into a 2-bit way
number with an OR encoder. After a hit this is the way that hit. After a miss it
is the way the refill wrote.

A CLA can go stale when its line is later replaced. This costs no correctness.
A buffer load by CLA copies the tag stored at that set and way together with
the data. If the line has changed, the next fetch simply misses the buffer, and
the KIT is rewritten with the new position.

## The ITT

Each entry holds the start instruction's address and the target CLA. The
table is 2-way set associative. The set is chosen by the low bits of the word
address (bits [3:2] for 8 entries), and both ways compare the remaining bits at
once. A fully associative table would keep a few more KITs, but it would need a
comparator per entry on every fetch. When a set is full, the older KIT is
dropped (FIFO). If a KIT is written for a start address that is already in the
table, the table rewrites that entry's CLA in place and does not store the
address twice. This happens when a branch changes direction. The rewrite is this
design's choice, so that a lookup never returns two hits.

`ENTRIES` may be any power of two of at least 4 (at the top, `P_ITT_SIZE`,
which may also be 0 for no table). Size trades hit ratio against the energy
of searching the table on every fetch. Published measurements on benchmark
programs found little hit-ratio gain beyond about 16 entries, and they put the
useful range at 4 to 32. Loops with more inter-line transfers than the table
holds keep gaining from larger sizes; see the sweep under Verification.

## What happens on a fetch

The line buffer and the ITT are both looked up with every accepted fetch
address:

| line buffer | ITT | action |
|---|---|---|
| hit | miss | return the word from the buffer; LIAR ← address |
| hit | hit | return the word from the buffer; load the buffer with the line at the ITT's CLA; LIAR ← address |
| miss | miss | access the cache (refill on a miss); return the word; write KIT {LIAR, {index, CLIR}}; load the buffer with the fetched line; LIAR ← address |
| miss | hit | as miss/miss, but load the buffer with the line at the ITT's CLA |

The LIAR always holds the previously fetched address. That is the start of
the transfer when the current fetch misses. No KIT is written before the first
fetch after reset.

### Timing

These cycle counts are this design's choice. The scheme itself fixes only the
order of the steps.

* **Line buffer hit:** the response (`resp_valid_o`) comes in the cycle after
  acceptance. `req_ready_o` stays high, so buffer hits stream at one fetch per
  cycle. On an ITT hit the predicted line is read from the cache's CLA port
  and written into the buffer at the same clock edge. The next fetch already
  sees it, so a prediction costs no cycle.
* **Line buffer miss, cache hit:** FSM `ST_IDLE → ST_CACHE → ST_RESP`. The
  response comes 2 cycles after acceptance, and the next request is taken one
  cycle later. The KIT write, the LIAR update and the buffer reload all happen
  in `ST_RESP`.
* **Cache miss:** `ST_CACHE → ST_REFILL`. The unit raises `mem_req_valid_o`
  with the line address until `mem_req_ready_i`. It then waits for one
  `mem_rvalid_i` beat that carries the whole 512-bit line, with word 0 in bits
  31:0. The line goes into the round-robin victim way, and the response
  follows in the next cycle (`ST_RESP`).

Only one fetch is in flight at a time. The `ev_*` outputs pulse once per event,
for hit-ratio counters: buffer hit or miss, ITT hit, cache refill, KIT write,
ITT eviction or rewrite, and predicted buffer load.

The cache arrays are written as plain arrays with combinational reads, one
tag and one data array per way. They have two read ports: lookup by address,
and read by CLA. A real implementation would map them to SRAM macros. It would
then have to retime the CLA read, or forward the line into the buffer, to keep
the zero-cycle prediction.

## Where this departs from, or goes beyond, the scheme as published

* The cycle timing, the memory refill interface, the reset behaviour, the
  round-robin cache replacement, the ITT's in-place rewrite and its choice of
  set-index bits, and the event strobes are all this design's own choices.
* In the miss/hit case the buffer ends up holding the predicted line, not the
  fetched one, following the order of the operation steps.
* `P_ITT_SIZE = 0` removes the table. The unit is then a plain line buffer
  cache without prediction, which serves as the reference point when table
  sizes are compared.
* The host processor and its data cache are not included. The fetch port and
  the refill port are the boundary.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_plb_kitps_cache` runs the top at its default sizes. It drives about
  40,000 fetches from synthetic loop programs in a 64 KB code region, some
  with diverging branches, and one program thrashes a single cache set. A
  behavioural memory applies random back-pressure and 1–6 cycles of latency.
  Every returned word is checked against a fixed function of its address. An
  independent reference model of the fetch policy predicts, for each fetch,
  the line-buffer and ITT outcome and the cache hit. The bench checks the event
  strobes and the exact latency against it. It also counts a failure for any
  mechanism that never happened: the four table cases, a refill, a
  replacement, a KIT write, an eviction, a rewrite, a useful prediction,
  back-pressure, and back-to-back fetches. A short directed loop comes
  first, with outcomes worked out by hand. It checks that a jump target which
  missed once is preloaded on the next pass and then hits. It also checks the
  case where the jump's source instruction itself missed the buffer. It prints the buffer hit ratio next
  to that of a buffer without prediction. On this synthetic trace prediction
  lifts it from about 87 % to 90 %.
* `tb_itt_size_sweep` runs eight copies of the unit side by side on one
  deterministic trace, with table sizes 0, 4, 8, 16, 32, 64, 128 and 256. The
  trace has four loops of 3, 6, 9 and 12 basic blocks. Each copy checks its
  own instructions and latency, and size 0 is checked against a model of a
  plain line buffer. The helper `tb/kitps_sweep_harness.sv` holds one copy
  with its driver and memory. Line-buffer hit ratios on this trace:

  | ITT entries | 0 | 4 | 8 | 16 | 32 | 64 | 128 | 256 |
  |---|---|---|---|---|---|---|---|---|
  | hit ratio (%) | 81.9 | 83.0 | 87.5 | 90.4 | 92.7 | 94.5 | 95.9 | 96.2 |

  The 4-entry table gains little here because the larger loops have more KITs
  than it can hold, and they push each other out.
* `tb_icache`, `tb_itt`, `tb_line_buffer`, `tb_clir` and `tb_liar` check the
  blocks against small reference models with random and directed stimulus.

To simulate one with Verilator 5:

```
verilator --binary --timing --assert -y rtl --top-module tb_plb_kitps_cache \
    rtl/kitps_pkg.sv tb/tb_plb_kitps_cache.sv
./obj_dir/Vtb_plb_kitps_cache
```

Sizes are set through the top's parameters (`P_CACHE_BYTES`, `P_LINE_BYTES`,
`P_WAYS`, `P_ITT_SIZE`, `P_ADDR_W`, `P_INSTR_W`). The testbench reference
model is written for the default sizes.
