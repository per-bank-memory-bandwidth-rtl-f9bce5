# Per-bank DRAM bandwidth regulation

On a multicore chip that shares DRAM, the worst interference a task can suffer
does not come from heavy traffic. It comes from traffic aimed at a single DRAM
bank. Requests to different banks proceed in parallel, but requests to one bank
are serialised, and each row miss costs a full row cycle (tRC, about 45-65 ns in
every DRAM generation). One bank therefore guarantees only about
64 B / tRC ≈ 1-1.4 GB/s, however fast the memory is. A few cores that hammer one
bank can slow a victim by tens of times while using less bandwidth than a
streaming workload.

A conventional regulator gives each core a single, system-wide budget. To
protect a real-time task it must assume that all of this budget lands on one
bank, so the budget has to stay below that one bank's worst case. That wastes
almost all of the memory's parallelism when traffic is spread out.

This RTL regulates **per bank**. Each regulation domain (a group of cores)
gets a budget of N_acc cache-line reads per period P, and this budget applies
**to every DRAM bank separately**:

```
per-bank bandwidth  B = N_acc / P × 64 B × f_clk
usable bandwidth    BW_max = B × N_banks
```

In the worst case, with all traffic on one bank, the protection is the same as
for an all-bank regulator with the same budget. Spread-out traffic gets
N_banks times more.

This is an RTL rendering of the regulator of *Per-Bank Memory Bandwidth
Regulation for Predictable and Performant Real-Time Systems*, built inside a
RISC-V SoC: BOOM cores, a TileLink system bus and an inclusive shared LLC. The
published material describes what each part does, not its circuits. The
circuits here, the register layout and the handshakes are this design's own.
The sections below say which is which.

## Where the regulation happens

```
 Core 0 .. Core 3
     │ channel A (requests)
 ┌───▼────────────┐   throttle[D][N_banks]   ┌────────────────────────┐
 │   tag_unit     │◄─────────────────────────┤    dram_regulator      │
 │ core → domain  │   (regulation forwarding)│ period counter         │
 │ stall throttled│                          │ budget[D]              │
 │ AcquireBlocks  │                          │ count[D][N_banks]      │
 └───┬────────────┘                          └──▲──────────────┬──────┘
     │ requests + domain tag                    │ issued reads │ throttle
 system bus                                     │              │
 ┌───▼──────────── LLC bank 0 .. 1 ─────────────┴──────────────▼──────┐
 │  27 MSHRs ──► mshr_sched (round-robin, skips throttled MSHRs) ──────┼──► memory bus
 └────────────────────────────────────────────────────────────────────┘
```

The regulator sits **inside the shared LLC**, where it decides when the miss
registers (MSHRs) may send their reads to memory. A regulator placed between
the LLC and the memory controller would see LLC banks as its clients, not
cores. Stalling an LLC bank there would block every core's traffic, unless a
large request queue were added.

A request goes through these steps:

1. **Tagging.** `tag_unit` looks up the requesting core's domain in a small
   register table and sends it along with the request (`bus_a_domain`).
2. **Miss and MSHR.** The LLC allocates an MSHR for a miss. The MSHR holds the
   domain and the address. That logic is the cache's and is not part of this
   RTL.
3. **Scheduling.** Each LLC bank's `mshr_sched` picks the next MSHR round-robin.
   An MSHR whose AcquireBlock (cache-line read) targets a DRAM bank that is
   throttled for its domain is not eligible, so it simply waits. MSHRs of other
   domains and other banks go ahead.
4. **Counting.** Each AcquireBlock that actually leaves is reported to
   `dram_regulator` with its domain and DRAM bank. The regulator adds it to
   `count[domain][bank]`.
5. **Throttle.** If a domain is regulated and `count[d][b] >= budget[d]`, then
   `throttle[d][b]` is set. From then on that (domain, bank) pair issues nothing
   more this period.
6. **Forwarding.** The same throttle bits go back to `tag_unit`. There, an
   AcquireBlock from a core of domain d to bank b is held at the core. A
   throttled domain then also stops loading the LLC banks with requests that
   could only wait.
7. **Replenish.** After P cycles the period counter wraps, every counter
   clears and all throttle bits drop.

The DRAM bank of an address comes from `bank_map`. Each bank-address bit is the
XOR of a chosen set of address bits. A single bit per set gives a direct map,
which is the default: bits 9, 10 and 11, so 8 banks. Several bits per set give
the XOR maps that many controllers use. The bank map must match the memory
controller's own mapping, or the regulator will count the wrong banks.

## Blocks

| file | what it is |
|---|---|
| `rtl/bru_pkg.sv` | shared types: TileLink channel-A opcodes, register-port structs, register offsets, default bank map, evaluation constants |
| `rtl/bank_map.sv` | address → DRAM bank, XOR of masked address bits (combinational) |
| `rtl/tag_unit.sv` | per-core domain table, domain tagging, forwarded AcquireBlock stall |
| `rtl/dram_regulator.sv` | period counter, per-domain budget and enable, per-(domain, bank) counters, throttle decode |
| `rtl/mshr_sched.sv` | throttle-gated round-robin MSHR selection for one LLC bank |
| `rtl/perbank_bru_top.sv` | the above wired together: one tagging unit, one scheduler per LLC bank, one regulator |

Parameters of the top and their defaults (the evaluated system):

| parameter | default | meaning |
|---|---|---|
| `N_CORES` | 4 | cores behind the tagging unit |
| `N_DOMAINS` | 2 | regulation domains (e.g. real-time, best-effort) |
| `BANK_BITS` | 3 | DRAM bank-address bits (8 banks) |
| `BANK_MASKS` | bits 9, 10, 11 | one XOR mask per bank bit (`bru_pkg::bank_masks_t`) |
| `N_LLC_BANKS` | 2 | LLC banks, each with a scheduler |
| `N_MSHRS` | 27 | MSHRs per LLC bank |
| `CNT_W` | 32 | width of period, budget and counters |
| `RESET_PERIOD` | 1 000 000 | period after reset: 1 ms at 1 GHz |
| `RESET_BUDGET` | 828 | budget after reset: 828 × 64 B / 1 ms = 53 MB/s per bank |
| `SRC_W` | 8 | TileLink source-id width |

Addresses are 36 bits (`bru_pkg::PADDR_W`). Bank maps may use up to 8 bank bits
(`MAX_BANK_BITS`, 256 banks).

## Registers

Both units have a simple register port (`mmio_req_t` in, `mmio_rsp_t` out).
A request is accepted every cycle, writes take effect on the clock edge, and
read data is valid one cycle after the request. The read returns the value from
before a write in the same cycle. Offsets are in bytes, and all registers are
32 bits.

`dram_regulator`:

| offset | name | access | meaning |
|---|---|---|---|
| 0x000 | PERIOD | rw | period P in cycles. A write restarts the period and clears all counters. 0 behaves as 1. |
| 0x004 | DOMAIN_EN | rw | bit d set: domain d is regulated. Reset: 0, nothing regulated. |
| 0x100 + 4·d | BUDGET[d] | rw | N_acc of domain d, in cache lines per period. The same value applies to each bank. |
| 0x400 + 4·(d·N_banks + b) | COUNT[d][b] | ro | reads of domain d to bank b so far in this period |

`tag_unit`:

| offset | name | access | meaning |
|---|---|---|---|
| 0x000 + 4·c | DOMAIN[c] | rw | domain of core c. Reset: 0. A write of a domain that does not exist is ignored. |

A typical setup puts the real-time core alone in domain 0, which stays
unregulated. The other cores go in domain 1, which is enabled with a budget:

```
tag  0x004 ← 1, 0x008 ← 1, 0x00C ← 1     cores 1-3 → domain 1
reg  0x104 ← 828                          budget of domain 1
reg  0x000 ← 1000000                      period, restarts counting
reg  0x004 ← 0b10                         regulate domain 1 only
```

## Timing and exactness

- `bank_map`, the tagging unit's stall and the scheduler's selection are
  combinational. Counters, the period counter and the registers change on the
  clock edge. The throttle bits are decoded from registers only, so there is no
  combinational path from a reported read to a throttle bit. A throttle rises
  one cycle after the read that reached the budget, and falls one cycle after
  the last cycle of the period (`period_end`).
- Reads reported in the last cycle of a period count toward the next period.
- **Overshoot.** Each LLC bank decides on its own in the same cycle. When the
  counter is one below the budget, both LLC banks can issue to the same
  (domain, bank). The bound is therefore `budget + N_LLC_BANKS − 1` reads per
  bank per period, not `budget`. The one-period test at the evaluated settings
  shows 828 or 829 reads.
- **In-order stall at the cores.** Channel A is in order, so a core whose next
  AcquireBlock goes to a throttled bank waits there until the period ends, even
  if its later requests target other banks. With a synthetic sweep over all 8
  banks, best-effort cores reach 77-80 of the ideal 80 reads per period. This
  follows from stalling at the tagging unit.
- Only AcquireBlocks are counted and throttled. Write-backs, uncached Gets,
  Puts and all other requests pass without regulation.
- Counters saturate at 2^CNT_W − 1.

## What is not in this RTL

The RTL contains only the regulation logic. These parts connect through the
top's ports:

- **Cores.** They connect through `core_a_*`. Only TileLink channel A passes
  the tagging unit; the other channels bypass it.
- **System bus.** The tagged requests leave on `bus_a_*`, with the domain on
  its own signal (`bus_a_domain`). How the domain travels through the
  interconnect to the LLC (user bits, source-id bits) depends on the bus.
- **LLC banks.** The inclusive cache itself (tags, data, directory, MSHR
  contents, the cache-resource checks) is outside. Each LLC bank presents its
  MSHRs on `mshr_req_valid/acquire/domain/addr` and gets the chosen one back on
  `mshr_grant*`. `mshr_req_valid` must already include the cache's own
  readiness check.
- **Memory bus and DRAM controller.** `mem_issue_ready` is the only signal used.
- **Periphery bus.** Each unit has its own register port; base addresses are
  left to the bus.

Not included at all:
- The all-bank (single counter per domain) regulator, which is only the
  comparison baseline.
- The DRAM controller's write batching (separate read/write queues with
  watermarks), which belongs to the simulated memory system, not to the
  regulator.

## Departures and own choices, in one list

- Throttling starts at `count >= budget`. The original text once says
  "exceeds" and elsewhere defines the budget as the number of accesses allowed
  per period; this RTL follows the latter.
- Register offsets, widths, reset values (evaluation period and budget, no
  domain regulated, all cores in domain 0), the write-restarts-period rule and
  the readable counters are this design's.
- The forwarded throttle bits reach the tagging unit without a register stage.
  A physical implementation with distant blocks may add one. The stall then
  acts one cycle late, which is harmless: the LLC-side gating is what enforces
  the budget.
- Round-robin order in the scheduler: the search starts after the MSHR that
  issued last.
- The bank map is a generic XOR-mask network. The published description gives
  the mapping only as a software routine.

## Simulating

Every file is plain SystemVerilog 2017. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/bru_pkg.sv tb/perbank_bru_top_tb.sv --top-module perbank_bru_top_tb
./obj_dir/Vperbank_bru_top_tb
```

Swap the testbench name for any other bench. Each prints
`TB_RESULT checks=N failures=M` at the end.

| testbench | what it shows |
|---|---|
| `bank_map_tb` | default direct map, plus a 128-bank DDR4 XOR map and a 256-bank LPDDR5 XOR map, against a bit-by-bit reference |
| `tag_unit_tb` | tagging, domain table, stall only for throttled AcquireBlocks, random traffic |
| `dram_regulator_tb` | cycle model of counters, period, throttle and registers under random traffic and register writes |
| `mshr_sched_tb` | round-robin order, throttle gating, reports to the regulator, one issue per cycle when all MSHRs are ready |
| `perbank_bru_top_tb` | whole design at default parameters inside a small SoC model: a single-bank attack held to one budget, an all-bank load getting about 8 budgets, random traffic with domain moves, and one full 1 ms period at the 828-line budget. It runs about 1.1 M cycles in a few seconds. |
| `bank_scaling_tb` | best-effort reads per period while sweeping 1..8 banks: 12, 24, … 96 with a 12-line budget, so throughput scales with the number of banks. The unregulated real-time core keeps its throughput. |

The SoC model in the two system benches is deliberately simple:
- an accepted AcquireBlock always misses;
- the LLC bank is picked by address bit 6;
- memory has a fixed 60-cycle latency, no bank conflicts, and is ready on 80 %
  of cycles;
- each core has at most 6 misses outstanding.

The benches therefore check the regulator's accounting and isolation rules,
not DRAM timing or the slowdown numbers of a real system.

Each bench was also run against a deliberately broken copy of its block and
reported failures:
- `bank_map`: OR instead of XOR;
- `tag_unit`: stall applied to the wrong opcodes;
- `dram_regulator`: throttle at `>` instead of `>=`;
- `mshr_sched`: round-robin pointer frozen;
- top: forwarding path cut.

To use a different memory, set `BANK_BITS` and `BANK_MASKS` on the top.
For example, 16 banks on bits 9-12 is `BANK_BITS=4` with masks `1<<9` …
`1<<12`. The counters grow as `N_DOMAINS × 2^BANK_BITS`.
