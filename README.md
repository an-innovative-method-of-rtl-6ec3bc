# Self-testing NoC router FIFO: on-line transparent SOA-MATS++ with faulty-row bypass

Most of the area of a network-on-chip router sits in its FIFO buffers, and
their SRAM cells wear out in the field. Aging (oxide breakdown,
electromigration, NBTI, hot carriers) turns them first into intermittent
faults and then into permanent ones: stuck-at cells, cells that cannot make
one of their transitions, and similar. This RTL keeps such a buffer in service:

* **It tests the buffer on line, without losing its contents.** A march test
  runs while the buffer carries traffic. The test is *transparent*: the
  words already in the buffer are the test pattern. Every row is inverted
  and then restored, so nothing has to be loaded first and nothing is lost.
* **It repeats the test periodically**, so faults do not pile up unseen.
* **It steps over rows that failed.** Failing rows go into a small fault
  table. From then on the FIFO pointers skip those rows. A dead cell costs
  one row of capacity instead of corrupting flits.

The design follows the transparent SOA-MATS++ method published as "An
Innovative Method of Handling Intermittent Faults in Network-on-Chip Embedded
Memory". That method gives the test algorithm and the idea of bypassing
faulty rows. How the test shares the RAM with traffic, the bypass pointers,
the fault table and the scheduler are this design's own. The section
*Where this design departs from the method* lists every such choice.

## Structure

```
                          noc_fifo_top (NOC_FIFO_TOP)
   test_ctrl ─────────┐
   sched_en ─► test_scheduler ──sched_req──►(OR)──► soa_matt (SOA_MATT)
                  ▲                              │ transparent SOA-MATS++ engine
                  └────────── test_full ─────────┤ fault table (2 rows)
                                                 │  t_re/t_we/addresses/data   ▲ data_in
                                                 ▼  row_inverted  row_written  │
   wr_en,data_in ─► fifo_ram (FIFO_RAM) ─────────────────────────────────────────┘
   rd_en ────────►   pointers with bypass, occupied bits, port sharing
   full,empty ◄──    └── dp_ram (DP_RAM): 256 x 8 RAM, 1 write + 1 read port,
   data_out ◄────                          fault injection sites (flt_*)
```

| File | Contents |
|---|---|
| `rtl/noc_fifo_pkg.sv` | default sizes, the run and state enums, the fault-kind enum |
| `rtl/dp_ram.sv` | the RAM, with fault injection sites (stuck-at, transition, read disturb, stuck-open) |
| `rtl/fifo_ram.sv` | the FIFO: pointers, bypass, full/empty, sharing of the RAM with the test |
| `rtl/soa_matt.sv` | the test engine and the fault table |
| `rtl/test_scheduler.sv` | the periodic test request |
| `rtl/noc_fifo_top.sv` | the three wired together |

The instance names in capitals are kept in the hierarchy.

## The test: one march element, three address runs per row

A FIFO moves its address on by one after every access, so a test can only
visit the rows in one order and touch each row with at most one read and one
write per pass. That is the *single-order addressing* (SOA) form of MATS++.
The engine applies three runs to each row `i` (0 to 255), then moves to
`i+1`:

| run `j` | name | reads | keeps | writes back | good row gives |
|---|---|---|---|---|---|
| 0 | invert  | `temp = RAM[i]` | `original = temp` | `~temp` | — |
| 1 | restore | `temp = RAM[i]` | `result = temp ^ original` | `~temp` | `result` all ones |
| 2 | verify  | `temp = RAM[i]` | `result = temp ^ original` | — | `result` all zeros |

After run 1 the row holds its original word again. A bit of `result` that
breaks the pattern marks the failing bit position.

Example, 8-bit word `5a` with bit 7 stuck at 1. Run 0 reads `da`, because
the stuck bit shows, and saves it as `original`. It writes `25`. Run 1 reads
`a5`, because bit 7 is still 1. The XOR with `da` gives `7f` instead of
`ff`: bit 7 is caught in the restore run.

**Why the third read matters.** Take a cell that cannot rise from 0 to 1 and
holds a 1. Run 0 writes a 0, which works. Run 1 reads that 0 correctly, so
its compare passes. But run 1's write back of the 1 fails, and only the
verify read sees it. `tb_soa_matt` injects exactly this fault and checks that
the restore compare is `ff` while the row still ends up in the fault table.

Timing: the RAM reads synchronously, so each run takes two cycles:

* `T_READ` issues the read.
* `T_EXEC` receives the word, compares it and, in runs 0 and 1, writes back.

A row takes 6 cycles and a full test takes 6 × 256 = 1536 cycles. A restart
(see below) adds 1 or 3 cycles.

**Starting and stopping.** `soa_matt` registers its request
(`test_ctrl_ext_d`) and detects both edges:

* A rising edge starts a test at row 0.
* A falling edge stops it after the row in progress, so no row is ever left
  inverted.
* `test_full` pulses for one cycle when row 255 is done.

**Fault table.** A row that fails either compare is stored in the first free
one of two entries (`faulty_address[0..1]`, `faulty_valid`). A row already
there is not stored again. The entries last until reset. A failing row that
finds both entries taken sets `fault_overflow`. That row is not bypassed.
`fault` goes high at the first failing row of a test. It stays high until the
next test starts.

## Sharing the RAM with traffic during a test

This is the least obvious part of the design. The RAM has one read port and
one write port, and the traffic does not stop while a test runs. For each
row the engine uses the ports as follows:

| cycle in row | 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|
| state, run | READ 0 | EXEC 0 | READ 1 | EXEC 1 | READ 2 | EXEC 2 |
| read port | engine | free | engine | free | engine | free |
| write port | free | engine | free | engine | free | free |
| row `i` holds | word | word | complement | complement | word | word |

* **Ports.** The engine always has priority. In a cycle where it reads, the
  FIFO shows `empty`. In a cycle where it writes, the FIFO shows `full`. The
  router just waits, as it would for any back-pressure.
* **Reading the row under test.** This is blocked only while the row holds
  the complement of its word, which is run 1 (`row_inverted`). In the other
  cycles the stored word is correct. Reading it frees the row; the engine
  still restores the word it saved, which does no harm.
* **Writing the row under test.** This is allowed, because the FIFO only
  writes rows that hold no word. But the engine's restore write would put
  the old word back over the new one. So `fifo_ram` reports the write on
  `row_written`. If that happens before the restore, the engine tests the
  row again from run 0, with the new word as its pattern. The write can only
  land in a `T_READ` cycle, so a restart costs 1 cycle in run 0 and 3 in
  run 1. A writer that catches up with the engine therefore overtakes it
  instead of queueing behind it at one row per 6 cycles.

Measured with saturated traffic (`tb_throughput`):

* 1.000 words/cycle between tests.
* 0.498 words/cycle during a test. The limit is 0.5, since the engine holds
  the read port every other cycle.
* 0.863 words/cycle overall with the default 4096-cycle period.

## Bypassing faulty rows

`fifo_ram` keeps a write pointer and a read pointer plus one *occupied* bit
per row:

* **Write row.** It is the first row at or after the write pointer that is
  not in the fault table. With at most two faulty rows, one of any three
  consecutive rows is usable, so this is a 3-way comparison and not a search.
* **Read row.** It is the first row at or after the read pointer that is
  either occupied or not faulty. A word written before its row was found
  faulty is therefore still delivered, in order. A faulty row that holds no
  word is skipped.
* **Capacity.** It is 256 minus the number of faulty rows that hold no word.
  The buffer is full when `count + that number = 256`. With two faulty rows
  the buffer takes 254 words.

A word that sat in a row while its cell went bad comes out corrupted. The
design detects the row, but it cannot repair a word already stored there.

## Interface of `noc_fifo_top`

All signals are synchronous to the rising edge of `test_clk`. `rst` is
synchronous and active high.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `wr_en`, `data_in` | in | 1, 8 | write a word; taken when `full` is low |
| `full` | out | 1 | no room, or the engine uses the write port this cycle |
| `rd_en` | in | 1 | read a word; taken when `empty` is low |
| `data_out`, `data_valid` | out | 8, 1 | the word read in the previous cycle |
| `empty` | out | 1 | no word, or the read port or the next row is taken by the test |
| `count` | out | 9 | words held |
| `wr_pointer`, `rd_pointer` | out | 8 | rows the next write and read use, after skipping |
| `test_ctrl` | in | 1 | rising edge starts a test; falling edge stops it at the next row boundary |
| `sched_en` | in | 1 | periodic testing on |
| `test_active` | out | 1 | a test is running |
| `test_full` | out | 1 | one-cycle pulse: all rows tested |
| `fault`, `fault_overflow` | out | 1, 1 | see *Fault table* |
| `result` | out | 8 | last compare word, `temp ^ original` |
| `faulty_address`, `faulty_valid` | out | 2×8, 2 | the fault table |
| `flt_en`, `flt_addr`, `flt_mask`, `flt_val`, `flt_kind` | in | 2, 2×8, 2×8, 2×8, 2 | fault injection, tie `flt_en` to 0 in use |

The test request is `test_ctrl OR` the scheduler's request. `test_scheduler`
raises its request every `TEST_PERIOD` cycles and holds it until
`test_full`. Clearing `sched_en` drops the request, which stops a running
test at the next row boundary.

**Fault injection.** The `flt_*` ports exist only to exercise the test in
simulation. Each of the two sites acts on the masked bits of one address and
works in one of four modes:

* `FLT_STUCK_AT`: the bits read back `flt_val`.
* `FLT_TRANSITION`: the bits cannot change to `flt_val`. For example,
  `flt_val = 1` models a failing 0-to-1 transition.
* `FLT_READ_DISTURB`: every read flips the bits in the cell and returns the
  flipped value.
* `FLT_STUCK_OPEN`: the bits are not driven on a read, so the read port
  repeats the bits of the previous read.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `DATA_W` | 8 | word width of the method's published waveforms |
| `ADDR_W` | 8 (256 rows) | address width of the same waveforms; the method leaves the row count open |
| `FAULT_SLOTS` | 2 | the waveforms show two faulty-address registers |
| `NINJ` | 2 | own choice |
| `TEST_PERIOD` | 4096 | own choice; the method only says "periodically" |

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/noc_fifo_pkg.sv tb/tb_noc_fifo_top.sv --top-module tb_noc_fifo_top
./obj_dir/Vtb_noc_fifo_top
```

Each testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog
that counts a failure if it runs too long.

| Testbench | What it shows |
|---|---|
| `tb_dp_ram` | reads and writes against a reference array, read-during-write, all four injection modes |
| `tb_fifo_ram` | order and count under random traffic, capacity with and without faulty rows, a word in a row that turns faulty, port sharing |
| `tb_soa_matt` | 6 cycles per row, contents restored, stuck-at-1 and stuck-at-0 found, table without duplicates, overflow, stop at a row boundary, restart after a write, transition fault found only by the verify run, read-disturb and stuck-open cells found |
| `tb_fig1_example` | the invert and restore runs on a 4-bit word 1010 with a stuck-at-1 MSB: reads 1010, writes 0101, reads 1101, compare 0111 |
| `tb_test_scheduler` | period, hold until done, enable |
| `tb_noc_fifo_top` | end to end at the default sizes, with a scoreboard and its own model of the bypassing write pointer (described below) |
| `tb_bypass_sequence` | the sequence of the method's waveforms, described below |
| `tb_throughput` | words per cycle with and without periodic tests, against the bounds above |

`tb_noc_fifo_top` runs random traffic through the following:

* external tests and periodic tests;
* faults injected in rows 0x00 and 0x0a;
* a fill to 254 words;
* a stopped test;
* a third faulty row that overflows the table.

It counts each of these events, plus bypasses, stalls, traffic during tests
and corrupted words, and it fails if any of them never happened.

`tb_bypass_sequence` starts with rows 0x00 and 0x0a faulty. It writes 13
words, which must land in rows 01–09 and 0b–0e, and reads them back.

To reduce the sizes, override `ADDR_W` (and `TEST_PERIOD`) on `noc_fifo_top`.
Everything scales with `2**ADDR_W`. Keep `FAULT_SLOTS` below the row count.

## Where this design departs from the method

* **How the test shares the buffer with traffic** is not specified by the
  method. The cycle-by-cycle port sharing, the read block during the inverted
  run and the restart after a write are this design's.
* **The algorithm as printed writes to `j` in the invert run and to `i` in
  the restore run.** Here both runs write the row under test, `i`; `j` only
  names the run.
* **The bypass mechanism is unspecified in the method.** The skip logic,
  the occupied bits and the capacity rule are this design's.
* **The fault table size** (2) is taken from the waveforms. What happens on
  overflow is this design's.
* **The meanings of `test_full` and of the `test_ctrl` edges** are read from
  signal names that the method shows but does not explain.
* **The test period, synchronous reset and one-cycle read latency** are own
  choices.
* **Fault models.** The method targets stuck-at, stuck-open, transition and
  read-disturb faults. The engine's compares catch any fault that changes
  what a row returns across the three runs. The injection hooks model all
  four kinds. Their exact behaviour (for example, a read-disturb cell that
  flips on every read) is this design's choice; other variants, such as
  deceptive read disturb, are not modelled.
* **The router itself is not included.** The method places the test circuit
  in the router's channel interface but does not describe the router.
  `noc_fifo_top` exposes the buffer's channel side and router side as ports.
