# SLC-enabled wear leveling for MLC phase-change memory

Multi-level-cell (MLC) phase-change memory stores two bits per cell, but a
cell survives only about 10^5 writes. The same cell used as a single-level
cell (SLC, one bit) survives 10^7 to 10^8 writes. Process variation adds a
second problem: some pages are born weaker than others, so a memory whose
writes are spread perfectly evenly still dies when its weakest page does.

This controller keeps the memory in MLC mode but lets a small number of
pages, the ones that are written heavily or are weak, run in SLC mode for a
while. An SLC page holds only half the data, so a small additional memory
(4 % of the page count by default) that always runs in SLC mode holds the
other half. Which pages get SLC mode is decided by per-page write counters
with *dynamic thresholds*; which page loses SLC mode when there is no room is
decided by a replacement policy. The pages that stay in MLC mode are balanced
by occasional swaps.

All of it is synthesizable SystemVerilog in `rtl/`. The PCM device itself is
not: the controller talks to it through a simple request/acknowledge port,
and `tb/pcm_model.sv` models it for simulation.

## Block structure

```
            cfg_* (endurance per page, from post-fabrication test)
                 |
host_* --> [addr_remap] --(physical page, word, mode)--> PCM port (pcm_*)
               |  ^  ^                                      ^
  host write   |  |  | set/clear SLC, swap                  |
               v  |  |                                      |
   [threshold_tracker] --report--> [slc_controller]         |
               |                        | decision          |
               | scan                   v                   |
         [mlc_swap_unit] --pair--> sequencer in sewl_top --> [transform_engine]
```

| Module | Role |
|---|---|
| `sewl_pkg` | policy, decision and operation enums; widths |
| `threshold_tracker` | write counter, threshold and write number per physical page |
| `slc_controller` | the SLC list and the FIFO / LRU / LW replacement policies |
| `addr_remap` | logical-to-physical page map, SLC flag and additional-page link per page, address translation |
| `transform_engine` | page rewrites: MLC to SLC, SLC to MLC, swap |
| `mlc_swap_unit` | periodic swap of the most and least worn MLC pages |
| `sewl_top` | wiring and the sequencer that serialises host accesses and maintenance |

## Dynamic thresholds (`threshold_tracker`)

Every physical page has a counter, a threshold and a running write number.

* When the page's endurance `E` is loaded, its first threshold is
  `T0 = E >> THR_SHIFT` (E/64 by default). A weak page therefore asks for SLC
  mode after fewer writes than a strong one.
* Each host write to the page increments the counter. When the counter
  reaches the threshold the page reports to the SLC controller. The counter
  restarts at zero, the threshold grows by one level (`DELTA`), and the
  threshold just reached is added to the write number.
* The write number is thus `T0 + T1 + ... + Tn` with `Tk = T0 + k*DELTA`.
  It estimates the page's total writes from its threshold history alone, and
  the least-worn policy uses it.

The threshold grows on *every* report, also when the controller then rejects
the page or the page is already in SLC mode. A hot page therefore asks less
and less often, and other pages get their turn.

Example with the defaults: a page with E = 100 000 reports after 1562 writes,
then after 2074 more, then after 2586 more. Its write numbers are 1562, 3636
and 6222.

## The SLC list and its policies (`slc_controller`)

The list has one slot per additional page (`NUM_SLC`, 40 for 1024 pages).
When a report arrives, the controller scans all slots, one per cycle, and
then makes one of four decisions:

| Decision | When | Effect |
|---|---|---|
| REFRESH | the page is already in the list | its record (write number, endurance) is updated |
| APPEND | there is a free slot | the page takes it |
| REPLACE | list full | the victim chosen by the policy returns to MLC; the requester takes its slot |
| REJECT | list full, LW only, requester less worn than every listed page | nothing changes |

Policies, chosen by the `POLICY` parameter:

* **FIFO** evicts the page that has been in the list longest.
* **LRU** evicts the page written least recently. Every host write to an
  SLC page refreshes its stamp.
* **LW** (least worn, the default) evicts the page with the smallest wear rate,
  `writeNumber / endurance`. These are the pages least at risk. Wear rates
  are compared by cross multiplication (`wn_a * E_b < wn_b * E_a`), so no
  divider is needed.

FIFO and LRU order is kept by stamps from a global counter. The smallest
stamp is evicted.

## Moving a page into and out of SLC mode (`transform_engine`, `addr_remap`)

A page in SLC mode keeps words `0 .. PAGE_WORDS/2-1` in its own cells and
words `PAGE_WORDS/2 ..` in its additional page. Both halves are programmed as
SLC. Additional page `k` is PCM page `NUM_PAGES + k`. Each page's entry in
the remapper records which additional page it uses.

| Operation | Reads | Writes | PCM accesses |
|---|---|---|---|
| TO_SLC (p, k) | whole page p as MLC into a page buffer | lower half into p as SLC, upper half into additional page k as SLC | 2 x PAGE_WORDS |
| TO_MLC (p, k) | lower half from p and upper half from k, as SLC | whole page into p as MLC | 2 x PAGE_WORDS |
| SWAP (a, b) | a into the buffer, then each word of b | each word of b into a, then the buffer into b | 4 x PAGE_WORDS |

A REPLACE runs TO_MLC on the victim, then TO_SLC on the requester into the
freed additional page. The remapper's tables change only when each operation
has finished.

## Swapping among MLC pages (`mlc_swap_unit`)

After every `SWAP_INTERVAL` host writes, the unit scans all pages, one per
cycle, and skips those in SLC mode. It finds the page with the highest wear
rate `(writes so far) / endurance` and the page with the lowest. If the
higher rate exceeds the lower by more than the factor
`(16 + SWAP_DISC_Q4)/16` (1.5 by default), it swaps the two pages. The swap
exchanges the pages' contents and their entries in the page map.

This is a reduced form of wear-rate leveling. It makes one swap per interval,
and it does not predict the next interval's writes.

## Interfaces and timing (`sewl_top`)

* **Endurance load** (`cfg_we`, `cfg_page`, `cfg_endurance`): one page per
  cycle. Every page must be loaded before it is written: the tracker's tables
  have no reset.
* **Host port**: raise `host_req` with `host_we`, `host_lpage`, `host_word`
  and `host_wdata`, and hold them until `host_ack` pulses. `host_rdata` is
  valid in that cycle. An access that is not held off takes the PCM latency
  plus three cycles until the next access starts.
* **PCM port**: `pcm_req` and its fields stay stable until `pcm_ack` pulses,
  with `pcm_rdata` for reads. `pcm_slc` selects SLC programming. One access
  is outstanding at a time. Because `host_rdata` is wired to `pcm_rdata`, the
  synthesis report shows those 64 output bits as driven by an input.
* **Stalls**: host requests wait (`host_stall`) in these cases: after reset,
  while the remapper loads its tables (NUM_PAGES cycles); while a report is
  being decided (NUM_SLC + 1 cycles); while pages are transformed or swapped;
  and while the swap unit scans.
* **Monitors**: `ev_report`, `ev_decision` with `ev_kind`, `ev_swap`,
  `slc_count`.

Only host writes count toward thresholds and swap intervals. Rewrites by the
engine do not count.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `NUM_PAGES` | 1024 | own choice |
| `SLC_PCT` | 4 | main configuration of the scheme (2 % and 8 % are the other points studied) |
| `NUM_SLC` | `NUM_PAGES*SLC_PCT/100` = 40 | follows from the above |
| `PAGE_WORDS` x `WORD_W` | 512 x 64 bit (4 KB page) | own choice |
| `POLICY` | `POL_LW` | LW is the best-performing policy of the three |
| `THR_SHIFT` | 6 (T0 = E/64) | own choice: thresholds must be reachable within benchmark-sized traces |
| `DELTA` | 512 | own choice |
| `SWAP_INTERVAL` | 16384 host writes | own choice |
| `SWAP_DISC_Q4` | 8 (factor 1.5) | own choice |

Endurance values are 20 bits wide, which covers the MLC mean of 10^5 with a
10 % standard deviation. Counters and write numbers are 32 bits wide.

## Where this design makes its own choices

These points are not fixed by the scheme. Change them first if your
requirements differ.

* The threshold ratio, the threshold step and their defaults. With E/16 and a
  4096-write swap interval, the swaps alone spread a million-write trace so
  evenly that no page ever reached its threshold.
* The threshold grows on every report, not only when the page is actually
  moved into SLC mode.
* The LW policy's rejection rule. FIFO and LRU never reject.
* The split of an SLC page's contents into a lower half (own cells) and an
  upper half (additional page). A full-page buffer is used so that rewrites
  are safe whatever the physical cell layout.
* Swapping is reduced to one hottest/coldest pair per interval, with no write
  prediction.
* The host is stalled during all maintenance. The list is scanned
  sequentially.
* The wear of the additional SLC pages is not tracked, because they are
  assumed to be far more durable.

The PCM device and the post-fabrication endurance test are outside this RTL.
Their signals are the `pcm_*` and `cfg_*` ports.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_threshold_tracker` | 600 random writes compared with a reference model: report timing, write numbers, scan port |
| `tb_slc_controller` | FIFO, LRU and LW instances on one random stream, compared with reference lists: decision, slot, victim, latency |
| `tb_addr_remap` | random SLC set/clear and swaps; every translation checked against a reference map |
| `tb_transform_engine` | TO_SLC, TO_MLC and SWAP on the PCM model: every word, its mode, and the access counts |
| `tb_mlc_swap_unit` | 40 random wear pictures: chosen pair, no-swap cases, SLC pages skipped, scan time |
| `tb_sewl_top` | 16 pages, 2 SLC pages, 8-word pages, one run per policy. Random traffic with a shadow memory; requires every report, append, replace, refresh, reject (LW), SLC write, swap and stall to happen |
| `tb_sewl_full` | all defaults. Skewed traffic until the list has filled and replaced or rejected 8 times (about 0.2 M writes), then all 512 K words read back |
| `tb_sewl_workload` | all defaults. A synthetic one-million-write trace over 730 pages, with per-page counts from 1 to 27 124 and ten pages above 15 000 |
| `tb_sewl_policies` | the same kind of trace on nine configurations side by side: FIFO, LRU and LW, each with 2 %, 4 % and 8 % SLC pages. Each must fill its list, return its data and make no PCM mode errors. A tenth run with `THR_SHIFT = 0` (no page ever reaches its threshold) is the swap-only reference and must use no SLC page |

In `tb_sewl_workload`, 21 % of the host writes are served in SLC mode, and all
ten hot pages are in SLC mode at the end. The worst MLC wear on any physical
page is 20 629 word writes, counting all transformation and swap rewrites.
Without the scheme, the hottest page alone would take 27 124.

`tb_sewl_policies` prints the following for each configuration. "Worst cell
wear" is the largest number of MLC writes to any one word of a physical page,
divided by that page's endurance, in parts per million. Lifetime ends when the
first cell wears out, so lifetime is inversely proportional to this figure.
The last column is the reference's worst wear divided by the configuration's,
that is, the lifetime relative to swapping alone (above 1 is better). The
reference, with swapping only, reaches 435 ppm.

| Configuration | Replacements | LW rejections | Writes in SLC mode | Worst cell wear (ppm) | Lifetime vs. swap only |
|---|---|---|---|---|---|
| FIFO 2 % / 4 % / 8 % | 219 / 185 / 126 | - | 15 / 17 / 21 % | 321 / 489 / 379 | 1.35 / 0.88 / 1.14 |
| LRU 2 % / 4 % / 8 % | 191 / 173 / 134 | - | 20 / 21 / 23 % | 414 / 403 / 492 | 1.05 / 1.07 / 0.88 |
| LW 2 % / 4 % / 8 % | 28 / 61 / 79 | 166 / 110 / 48 | 20 / 21 / 22 % | 454 / 467 / 271 | 0.95 / 0.93 / 1.60 |

With more SLC pages, more writes are served in SLC mode. LW replaces far less
often than FIFO and LRU, so it spends less wear on rewrites. The table is for
the default seed. With seed 7 (`+verilator+seed+7`), every ratio falls
between 0.70 and 1.15, and LW with 8 % gives 1.03. On this synthetic trace the
scheme therefore shows no clear lifetime gain over swapping alone. That is
far below the gains the scheme reports for real benchmark traces. Two likely
reasons, not yet confirmed: a page takes about 1/64 of its endurance in MLC
mode before it may switch, and a page evicted from the list takes its later
writes in MLC mode again.

The PCM model flags the following errors, and every testbench requires that
none occur:

* a read in a different mode from the word's last write;
* an SLC access to the upper half of a regular page;
* an MLC access to an additional page;
* a request that changes before it is acknowledged.

The endurance gains the scheme reports come from trace-driven simulation of
real benchmarks. They are not reproduced here.

### Running a testbench with Verilator

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl rtl/sewl_pkg.sv tb/tb_sewl_top.sv \
    --top-module tb_sewl_top -o sim
./obj_dir/sim
```

Replace `tb_sewl_top` with any testbench name. Each testbench resets and
initialises everything it reads, so `+verilator+rand+reset+2` may be added.
`tb_sewl_full` and `tb_sewl_workload` run for about 5 to 10 seconds, and
`tb_sewl_policies` for about 30. The others finish in under a second.
