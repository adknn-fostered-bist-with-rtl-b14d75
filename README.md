# Memory BIST with built-in self-repair (March test, threshold-based spare allocation)

An embedded SRAM inside a system-on-chip is hard to reach from outside, and a
single bad cell ruins the chip unless the memory can mend itself. This design
lets the SRAM test and repair itself. A March test controller writes and reads
every word under many data backgrounds. Every mismatch goes into a small fault
table. A repair analyzer then gives the faulty words spare rows and spare
columns: a row with two or more faulty words gets a spare row, and everything
left gets a spare column. From then on, redundancy logic sends every access to
a replaced row or column to the spare storage. The memory is tested again
through that logic to confirm the repair. Software starts and steers all this
through one control register. The memory model also holds programmable fault
slots, so the whole loop of inject, detect, classify, repair and re-test can
be simulated.

The RTL is SystemVerilog-2017. Every block is synthesizable except the fault
behaviour of the memory model, and even that is plain RTL.

## Structure

```
            cfg_we/cfg_wdata
                  |
           +--------------+   start/stop/resume/reset/halt/clk_en/mem_id
           |start_register|-------------------------------------------+
           +--------------+                                           |
                  | start                                             |
           +--------------+  test_start   +-----------------+         |
           |bisr_flow_ctrl|-------------->| test_controller |<--------+
           |  test ->     |<--test_done---|  (March FSM)    |<--> test_pattern_gen
           |  analyse ->  |               +-----------------+     (address, background)
           |  re-test     |                 | mem op   ^ fail/mask     |
           +--------------+                 |          |              | failure record
             | alloc_start                  |     +----------+        v
             v                              |     |comparator|   +-------------------+
     +---------------+   fault table        |     +----------+   | response_recorder |
     |bira_allocator |<---------------------|-----------^-------|  fault table,     |
     | (row/col rule)|                      |           |       |  counts, kinds    |
     +---------------+                      v           |       +-------------------+
             | ld_row/ld_col     +------------------+   |
             +------------------>| redundancy_logic |---+ rdata
                   sys_* port -->|  repair regs,    |
                                 |  steering        |
                                 +------------------+
                                   |              |
                            +-----------+   +--------------+
                            | mut_sram  |   | spare_memory |
                            | + faults  |   | rows, cols   |
                            +-----------+   +--------------+
```

| File | Block |
|---|---|
| `rtl/bist_pkg.sv` | shared types: March elements and operations, fault-slot record, fault kinds |
| `rtl/start_register.sv` | control register (start, stop, resume, reset, halt-on-error, clock enable, memory ID) |
| `rtl/test_pattern_gen.sv` | address counter (up/down sweeps) and data-background generator |
| `rtl/test_controller.sv` | March sequencer with failure-record, pause and halt states |
| `rtl/comparator.sv` | read data vs. expected word, fail flag and bit mask |
| `rtl/response_recorder.sv` | fault table, fault kinds, memory ID, counters, first failing address |
| `rtl/bira_allocator.sv` | redundancy analysis: assigns spare rows and columns |
| `rtl/redundancy_logic.sv` | repair registers and access steering to main or spare storage |
| `rtl/spare_memory.sv` | spare rows and spare columns |
| `rtl/mut_sram.sv` | the memory under test, with fault-injection slots |
| `rtl/bisr_flow_ctrl.sv` | test, analysis and re-test sequencing |
| `rtl/bist_bisr_top.sv` | everything wired together |

## The March test

The test is a six-element March sequence. Every element visits every address
and performs its operations on the word there:

| Element | Operations | Address order |
|---|---|---|
| E1 | w0 | up |
| E2 | r0, w1 | up |
| E3 | r1, w0, r0 | up |
| E4 | w0, r0, w1 | down |
| E5 | r1, w0 | down |
| E6 | r0 | up |

"0" means the current data background and "1" its complement. The whole
sequence runs once for each of `NUM_BG` backgrounds. By default there are 256:
every 8-bit value, stepped by a counter. Sweeping the backgrounds makes each
bit of a word see both values next to every combination of its neighbours.
That is what exposes coupling between bits of the same word.

There are 12 operations per address, one per clock. The memory reads
synchronously, so a read's data reach the comparator one clock after the read
is issued. The controller registers the expected word and the address with
each read (`exp_q`, `rd_pending_q`). When the comparator reports a mismatch:

1. In that clock the controller issues nothing. It latches the address,
   expected word and fail mask.
2. The next clock is the `FAIL_REC` state. The record goes to the response
   recorder.
3. The controller carries on where it left off.

**Timing.** A clean pass over N words with B backgrounds takes exactly
`12*N*B + 2` clocks from start to `done`. Each failing read adds 2 clocks. At
the default size (256 words, 256 backgrounds) a clean pass is 786,434 clocks.

**Control.** The start register steers the run:
- `stop` pauses after the operation in progress, and `resume` continues.
- With `halt_on_error` set, the controller also pauses after every recorded
  failure (`halted`) until `resume`.
- Clearing the clock-enable bit freezes the controller. A `resume` written
  while the clock is off is lost; a start is still taken.
- `reset` returns every sequencer to idle.

**Faults this sequence cannot see.** Every read in the sequence is followed
by a write to the same cell before the cell is read again. So a *deceptive
read destructive* fault is never observed: the read returns the right value
and only the stored value flips. The memory model can inject such a fault,
but this March test does not detect it.

## Fault table and fault kinds

The response recorder keeps up to `FT_DEPTH` (8) faulty words. A failure at an
address already in the table ORs its bit mask into the entry. A new address
takes a free entry. With the table full, `overflow` is set, and the flow then
reports the memory as unrepairable without trying. The recorder also keeps:
- the memory ID given at the start of the test
- the number of failing reads
- the number of faulty words, and of faulty cells (the bits set in the masks)
- the first failing address

**Fault kind.** Each entry notes whether its word failed on bits expected to
read 0, on bits expected to read 1, or on both. `bist_pkg::classify` turns
this into `FK_FAILS_ON1`, `FK_FAILS_ON0` or `FK_FAILS_ON_BOTH`. This is as far
as a March result can go without further diagnosis, and the classes alias:
- `FK_FAILS_ON1`: stuck-at-0, up-transition faults, and coupling that forces 0
- `FK_FAILS_ON0`: stuck-at-1, down-transition faults, incorrect reads of 0,
  and read-destructive faults on 0
- `FK_FAILS_ON_BOTH`: a word with faults of both polarities

## Repair analysis and steering

After a failing pass 1, `bira_allocator` walks the fault table twice, one
entry per clock, and loads the repair registers in `redundancy_logic`:

1. **Rows.** An entry that no spare covers yet, whose row holds at least
   `THRESH` (2) uncovered faulty words, gets a spare row while one is free.
   Entries are taken in table order, so when more rows qualify than there
   are spare rows, the rows that failed first win.
2. **Columns.** Every entry still uncovered gets a spare column while one is
   free. Once the columns run out it gets a spare row, and once the rows run
   out too the memory is unrepairable.

Analysis takes `2*FT_DEPTH + 1` clocks.

Example: faulty words at (row 2, col 1), (2, 5) and (7, 3). Row 2 has two
faults, so it gets spare row 0. Word (7, 3) then gets spare column 0.

**Steering.** `redundancy_logic` compares every access with the repair
registers:
- If the row is replaced, the access goes to that spare row. A replaced row
  takes priority over a replaced column.
- Otherwise, if the column is replaced, it goes to that spare column.
- Otherwise it goes to the main array.

A spare row holds `COLS` words, picked by the column address. A spare column
holds `ROWS` words, picked by the row address. The array a read went to is
registered, so read data come back one clock later from the right array. The
spares are assumed fault-free.

**Re-test.** After analysis, `bisr_flow_ctrl` clears the fault table and runs
the March test again, this time through the repair. The `result` output is:

| `result` | Meaning |
|---|---|
| 0 | no result yet |
| 1 | pass: the memory was clean |
| 2 | repaired: pass 1 failed, the re-test passed |
| 3 | unrepairable: table overflow, out of spares, or the re-test failed |

`pass1_failed` tells whether the first pass found anything. The pass-1 fault
table is cleared when the re-test starts. A reader who needs it must take it
from `ft_*` before `in_retest` goes high.

## Memory model and fault injection

`mut_sram` is a single-port synchronous SRAM of `ROWS*COLS` words. The word
address is `{row, column}`. Reads have one clock of latency, and `rdata`
holds between reads. The array is a register array rather than an inferred
RAM, because a coupling fault must be able to change a second word in the
same clock.

`NUM_FI` fault slots (`fault_cfg_t`) each hold:
- a fault type
- a polarity `pol`
- a victim word and bit
- an aggressor word and bit, used by coupling and address-decoder faults

| Type | Behaviour |
|---|---|
| `FT_SA` stuck-at | the victim bit reads and stores `pol` |
| `FT_TF` transition | a write taking the victim from `~pol` to `pol` leaves it at `~pol` |
| `FT_RDF` read destructive | reading the victim while it holds `~pol` returns `pol` and sets it to `pol` |
| `FT_DRDF` deceptive read destructive | same, but the read returns the correct `~pol` |
| `FT_IRF` incorrect read | reading the victim while it holds `~pol` returns `pol`; the cell is unchanged |
| `FT_WDF` write destructive | writing `~pol` over a stored `~pol` sets the victim to `pol` |
| `FT_CFID` idempotent coupling (ICF) | a 0-to-1 write of the aggressor bit sets the victim to `pol` |
| `FT_CFST` static/state coupling (SCF) | while the aggressor bit holds 1, the victim reads as `pol` |
| `FT_CFDS` disturb coupling (DCCF) | any read or write of the aggressor word sets the victim to `pol` |
| `FT_TCF` transition coupling (TCF) | while the aggressor bit holds 1, a write taking the victim to `pol` fails |
| `FT_AF` address decoder | a write to the aggressor word also writes the whole victim word |

A slot whose victim or aggressor lies outside the array does nothing. Faults
act on the main array only. Once a word is steered to a spare, its faults no
longer matter.

## Start register and top-level interface

Write `cfg_wdata` with `cfg_we`. Outputs change one clock later.

| Bits | Field | Behaviour |
|---|---|---|
| 0 | start | one-clock pulse, starts the flow |
| 1 | stop | held. Any later write without this bit clears it, and so does resume |
| 2 | resume | one-clock pulse |
| 3 | reset | one-clock pulse, soft reset of the flow, the test controller, the fault table and the repair registers |
| 4 | halt_on_error | held |
| 5 | BIST clock enable | held, 1 after reset |
| `MEM_ID_W+5`:6 | memory ID | held, recorded with the test results |

Every write sets all the held fields, so keep the clock-enable bit at 1 in
every write unless you mean to freeze the test.

Other ports of `bist_bisr_top`:
- `fault[NUM_FI]`: the fault slots of the memory model.
- `sys_en`, `sys_we`, `sys_addr`, `sys_wdata`, `sys_rdata`: the system's
  access port, used while no flow is running (`busy` low). It goes through
  the repair, with one clock of read latency.
- Status: `busy`, `done`, `result`, `pass1_failed`, `in_retest`, `paused`,
  `halted` and `element`.
- Recorder outputs: `rec_mem_id`, `fail_count`, `faulty_words`,
  `faulty_cells`, `first_fail_addr`, `ft_overflow`, and the table itself as
  `ft_valid`, `ft_addr`, `ft_mask` and `ft_kind`.
- Spares in use: `spare_row_used`, `spare_col_used`.

## Parameters

| Parameter | Default | Where the value comes from |
|---|---|---|
| `DATA_W` | 8 | 8-bit memory |
| `NUM_BG` | 256 | 256 distinct test patterns for an 8-bit memory |
| `THRESH` | 2 | repair threshold of two faults per row |
| `ROWS`, `COLS` | 16, 16 | this design's choice |
| `SPARE_ROWS`, `SPARE_COLS` | 2, 2 | this design's choice |
| `FT_DEPTH` | 8 | this design's choice |
| `NUM_FI` | 10 | this design's choice, enough to overflow the fault table |
| `MEM_ID_W` | 4 | this design's choice |

`ROWS` and `COLS` must be powers of two. `FT_DEPTH` should be one as well.

## Where this departs from the source design, and what is left out

The source describes the test pattern generator, the fault injection and the
fault-type detection as driven by an adaptive-activation deep Kronecker neural
network. It also frames the redundancy analysis as a Namib beetle
optimisation. For neither does it give sizes, weights, number formats,
objective functions or a mapping onto memory operations. This RTL therefore
puts deterministic stand-ins in their place:
- a background counter for pattern generation
- programmable fault slots for fault injection
- expected-value classification for fault types
- the threshold allocation rule the source does state, for redundancy
  analysis

These were taken from the source:
- the March states (w0; r0w1; r1w0r0; w0r0w1; r1w0; r0; failure record)
- the start-register fields
- the failure-record behaviour of the controller
- the recorder contents (memory ID, faulty-cell count, failing address)
- the fault table
- the redundancy logic
- the spare rows and columns
- the two-fault row threshold

The following are this design's own choices:
- address orders
- array and spare sizes
- the table depth
- all encodings and bit maps
- the row-over-column priority
- the single memory under test (the memory ID is recorded, not decoded)
- the 2-clock failure record

Not built:
- the analog parts of the BIST named by the source: a level-shifting buffer,
  a defect-signal amplifier and an operational amplifier
- the circuit-level pre-charge/XOR optimisation of the repair path
- fuse boxes and scan chains for storing repair signatures, which the source
  mentions only as general background
- any way to test several memories from one controller

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_comparator` | random words against a reference XOR |
| `tb_start_register` | pulses, held fields, stop cleared by resume, read-back |
| `tb_test_pattern_gen` | up and down sweeps, last-address flag, background wrap |
| `tb_test_controller` | compares every operation with a list built from the March definition; clean and faulty pass lengths; failure records; stop/resume, halt-on-error, clock enable, soft reset |
| `tb_response_recorder` | allocation, merging, kinds, counters, overflow, clear |
| `tb_mut_sram` | fault-free behaviour, and every fault type with hand-worked sequences |
| `tb_spare_memory` | every spare word written and read back |
| `tb_redundancy_logic` | steering against a reference model, read mux, full flags, clear |
| `tb_bira_allocator` | allocation outcomes for several fault tables, including overflow, and the analysis time |
| `tb_bisr_flow_ctrl` | the five ways a flow can end, and soft reset |
| `tb_bist_bisr_top` | see below |

`tb_bist_bisr_top` runs the whole design at its default parameters through
eight scenarios:
- clean memory
- a deceptive read destructive fault alone, which passes undetected as
  explained above
- single-cell faults repaired with a spare row and spare columns, then
  system reads and writes of the repaired words
- four coupling faults repaired with two columns and then two rows
- write-destructive, incorrect-read and address-decoder faults
- five scattered faults (unrepairable)
- nine faulty words (fault-table overflow)
- halt-on-error, stop/resume, clock enable and soft reset in one run

It checks every pass length. It also counts each mechanism (repair, spare
row, spare column, overflow, halt, stop, clock freeze, soft reset, re-test,
each fault kind) and fails if one never happened. It runs about 14 million
clocks and takes roughly 15 seconds.

To run a testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/bist_pkg.sv tb/tb_bist_bisr_top.sv --top-module tb_bist_bisr_top -Mdir obj
./obj/Vtb_bist_bisr_top
```

Replace the testbench name to run another. The package must come first on
the command line. Testbenches read nothing and write nothing.

Three blocks also carry assertions that stop simulation when a handshake rule
is broken (with `--assert`):
- the test controller issues memory operations only while running, and hands
  over failure records only from its failure-record state
- the redundancy logic never enables the main and spare arrays together
- the repair analyzer is never restarted while busy

**How far to trust it.** Every block is checked against values worked out
independently of the RTL. The end-to-end test exercises every fault type
except the deceptive read destructive fault, which this March sequence cannot
detect, as explained above. Nothing here has been taken to an FPGA or an ASIC
flow beyond synthesis for size. The memory arrays are flip-flop arrays; a
real SRAM macro would replace `mut_sram` and `spare_memory`. The design's
timing assumption, synchronous read with one clock of latency, matches such
a macro.
