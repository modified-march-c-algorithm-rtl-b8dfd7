# Concurrent Modified March C- memory BIST

This is a memory built-in self-test (BIST) for an embedded 256 x 8 SRAM. It
runs a variant of the March C- test that splits the memory into two halves
and tests both halves in the same clock cycles. The second half gets the
complement of the data the first half gets, so one inverter is the only
hardware this adds to an ordinary March test generator.

March C- applies 10 operations to every cell (`10n`). The modified test
applies 8 (`8n`), and because the two halves run side by side, a complete test
of the 256-word memory takes 4 x 256 = 1024 memory cycles at one operation per
clock.

## The test sequence

The memory is divided into two subgroups:

- **M1** is the lower half of the addresses (address bit 7 = 0).
- **M2** is the upper half (bit 7 = 1).

A March element applies a short list of reads and writes to every address,
in ascending (⇑) or descending (⇓) order, before it moves to the next
element. `w0` means "write all zeros", and `r1` means "read and expect all
ones". Both subgroups run these six elements at the same time:

| # | order | M1          | M2          | clocks (256 words) |
|---|-------|-------------|-------------|--------------------|
| 0 | ⇑     | w0          | w1          | 128                |
| 1 | ⇑     | r0, w1      | r1, w0      | 256                |
| 2 | ⇑     | r1          | r0          | 128                |
| 3 | ⇓     | w0          | w1          | 128                |
| 4 | ⇓     | r0, w1      | r1, w0      | 256                |
| 5 | ⇓     | r1          | r0          | 128                |

Each M2 operation is the M1 operation with the value inverted. Each cell
therefore does both things a March test needs:

- It is read as 0 and as 1, which detects stuck-at faults.
- It makes a 0→1 and a 1→0 transition and is read after each one, which
  detects transition faults.

In M1 the up transition is the `w1` of element 1, read by element 2. The down
transition is the `w0` of element 3, read by element 4. M2 does the same with
the roles swapped.

The table lives in one place, `march_pkg::elem_desc`, written from the M1
point of view. Each element has a direction and one or two operations, and
each operation is a read or a write plus the M1 value.

## Datapath and control

```
 en ─► march_ctrl ──load/step/dir──► addr_gen ──ad──┬──► M1 port ┐
         │  op_wr, op_val                           └──► M2 port ┤ mem_256x8
         └──► pattern_gen ── d_m1 = {8{v}} ──► M1 din / expected  │ (two 128x8
                          ── d_m2 = ~d_m1  ──► M2 din / expected  │  sram_banks)
 dout_m1, dout_m2 ◄──────────────────────────────────────────────┘
         └──► resp_analyzer ──► fail, fail_m1, fail_m2, first_*, err_count
```

- **`march_ctrl`** is a four-state FSM: IDLE, RUN, DRAIN and DONE. In RUN it
  issues one operation per clock. For an element with two operations it
  stays two clocks on each address. After the last address of an element it
  loads the address generator for the next element in the same cycle, so no
  clock is lost between elements. The controller never sees an address
  width. It learns that a sweep has ended from the generator's `last` flag.
- **`addr_gen`** is an up/down counter over one subgroup (7 bits). Both
  subgroups use the same local address in the same cycle.
- **`pattern_gen`** turns the operation's data bit into a solid 8-bit
  background word for M1. It inverts that word for M2. The same two words
  are the write data and the expected read data.
- **`mem_256x8`** is the memory under test. It is built from two
  `sram_bank`s, each a synchronous single-port 128 x 8 RAM with its own port.
  The separate ports are what let both halves be accessed in one cycle.
- **`resp_analyzer`** has one comparator per subgroup. It registers each read
  together with its expected words, address and element. One clock later,
  when the RAM's output is valid, it compares. Mismatches set the sticky
  flags `fail_m1` and `fail_m2` and are counted in `err_count`. The first
  mismatch is recorded in `first_addr`, `first_elem` and `first_syndrome`:
  its full address, the element that found it, and its failing bits.

## Timing of a run

`en` is a level:

1. Raise `en` while the BIST is idle. The clock edge that samples it loads
   the first address and clears the analyzer.
2. For the next 1024 clocks there is one operation per clock. `wr` or `rd` is
   high, `ad` is the local address and `di` is the M1 data word.
3. One drain clock follows, while the analyzer compares the last read.
4. `done` rises 1025 clock edges after the edge that sampled `en`. For a size
   of `AW` address bits this is 4·2^AW + 1.
5. `done` and the results hold until `en` falls. The BIST then returns to
   idle.

The test always runs to the end, even after a fault is found, so a faulty
memory takes exactly as long as a good one.

The reset `rst_n` is asynchronous and active low. It resets the controller,
the address generator and the analyzer, but not the RAM array.

## Fault injection

The RAM model can show one faulty cell at a time, which is how the BIST is
exercised in simulation:

- `flt_en` turns the fault on.
- `flt_addr` (a full address) and `flt_bit` pick the cell.
- `flt_kind` picks the fault:
  - `FLT_SA0` / `FLT_SA1`: the bit always reads 0 or 1. This also applies to
    data written before the fault was enabled.
  - `FLT_TF_UP` / `FLT_TF_DOWN`: a write cannot change the bit from 0 to 1,
    or from 1 to 0.

Tie `flt_en` low outside simulation. The port is a test hook of the model, not
part of a real SRAM macro.

## How far it can be trusted

Every block has a self-checking testbench in `tb/`.

**`tb_mbist_top`** is the end-to-end test. It runs at the full default size
(256 x 8, top parameters untouched) and does the following:

- It runs the BIST on the memory's random power-up contents and on clean
  memory.
- It runs 24 faulty cases that cover every fault kind in both subgroups,
  corner cells included.
- It compares the pass/fail flags, the error count and the first-failure
  record with a software model of the algorithm. The model works on a
  256-entry array with the same fault.
- It checks the test length to the clock (1025) and the number of reads
  compared (512).
- It counts complementary writes, ascending and descending steps, and
  read-then-write pairs.

All four fault kinds are detected in both subgroups.

**`tb_mbist_fig`** runs the same test body (`tb/mbist_e2e.svh`) on an 8 x 4
memory: a 2-bit subgroup address and 4-bit words. A full test there takes 33
clocks.

Each unit testbench was also shown to fail on a deliberately broken copy of
its module. The broken copies were:

- the inverter removed;
- a descending sweep that counts up;
- the read and write of an element swapped;
- the first-failure record overwritten by later mismatches;
- a transition fault injected in the wrong direction;
- a fault that leaks into the wrong subgroup;
- an analyzer that is never cleared.

None of this was run on silicon or an FPGA. No timing figures are claimed.

## Departures from the published scheme and open points

- **One operation per clock.** The published scheme gives the test's
  complexity (`8n`) but no clock-level protocol. Its simulation waveforms
  show the address changing every two clocks, even in a write-only element,
  with `wr` and `rd` alternating. That suggests a write-then-read-back step
  that this design does not have. The names `en`, `wr`, `rd`, `ad` and `di`
  follow those waveforms.
- **Element 3.** The algorithm is written in one place as
  M1 `⇓(w0)` / M2 `⇓(w1)`. A results table of the same source lists it as
  M1 `⇑(w1)` / M2 `⇑(w0)`. This design follows the first form. The second
  cannot work, because element 4 reads 0 from M1 right after.
- **Subgroup bounds.** The published pseudo code bounds its loops with
  `(n-1)/2` and `n-1`, which would skip the last row. Here each subgroup is
  exactly half the memory.
- **Full test, no early stop.** The pseudo code stops at the first mismatch.
  This BIST records the first mismatch and finishes the test, and it adds
  `err_count`, `rd_count` and the `first_*` outputs for diagnosis.
- **Memory organisation.** The published scheme says the subgroups are tested
  concurrently, but not how the memory allows it. Two single-port banks with
  separate ports are this design's choice. There is no functional-mode port
  or BIST/mission multiplexer, because none is described.
- **Not built.** Two things are outside this design:
  - The traditional March C- BIST the scheme is compared against.
  - The offline procedure for choosing test vectors per subgroup (fault
    simulation over subgroups). It is a design-time step, not hardware.

## Files

| file | contents |
|------|----------|
| `rtl/march_pkg.sv` | sizes, element table, operation and fault types |
| `rtl/march_ctrl.sv` | sequencer FSM |
| `rtl/addr_gen.sv` | up/down address counter |
| `rtl/pattern_gen.sv` | data background and inverter |
| `rtl/resp_analyzer.sv` | comparators, fail flags, first-failure record |
| `rtl/sram_bank.sv` | 128 x 8 synchronous RAM with fault injection |
| `rtl/mem_256x8.sv` | two banks forming the 256 x 8 memory |
| `rtl/mbist_top.sv` | the complete BIST with its memory |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mbist_fig` |
| `tb/mbist_e2e.svh` | shared body of the two end-to-end testbenches |

## Simulating and changing it

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To run the full-size end-to-end test with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl +libext+.sv \
    rtl/march_pkg.sv tb/tb_mbist_top.sv --top-module tb_mbist_top -o sim
./obj_dir/sim
```

Replace `tb_mbist_top` with any other `tb_*` module to run its unit test.
Every run finishes in well under a second.

To change the memory size, set `AW` (total address bits, at least 2) and `DW`
(word width) on `mbist_top`. The controller adapts by itself, because it takes
the end of each sweep from the address generator. The defaults come from
`march_pkg::MEM_ADDR_W` and `MEM_DATA_W`.

To run a different March test, edit `elem_desc` in `march_pkg`. If the new
test has more elements, or more than two operations per element, widen
`march_elem_t` and the controller's `elem` and `opi` counters to match.
