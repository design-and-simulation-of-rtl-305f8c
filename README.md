# Microcoded built-in self-test and repair for a small embedded memory

Embedded memories fail in ways that newer March tests catch and older ones
miss, and those newer tests have many operations per March element (March BLC
has up to seven). A BIST controller that hard-wires "two operations per
element" cannot run them. This design stores the test as microcode, **one
memory operation per 7-bit microword**, so an element of any length is just a
longer run of words, and a different March test is just different store
contents. Faults the test finds are repaired on the spot: each faulty word's
address and correct data are written into a small array of redundant words
that sits beside the memory and, in normal operation, answers for the faulty
location.

The RTL follows the published design "Design and Simulation of Microcode based
Built-In Self Repair for Embedded Memories to Enhance Fault Coverage": its
block structure, the microword format, the March BLC test, the redundant-word
layout and the fill-then-overflow repair flow. The sequencing state machine,
the pointer's loop-back rule, timing, reset style and a few sizes are this
implementation's own (listed under "Departures and own choices").

## Block structure

```
                    +-------------------- mbist_controller --------------------+
 start ------------>| inst_ptr -> inst_storage -> inst_reg                     |
                    |    ^  {fo,io,lo}, over        | down | wr | data          |
                    |    |                        addr_gen data_gen rw_control  |
                    | smc_controller (all enables)      |      |       |        |
                    | fault_diag <- mem read data, expected data, address       |
                    +---------|-------------------------|------|-------|--------+
          fault pulse/addr/   |                  t_addr  t_data  t_wr/t_rd/t_mem_en
          correct data        v                         v
                    redundancy_array <--- memory-side bus --- input_mux <-- addr_in, data_in,
                    (N_RED x redundancy_word)               |               wr_in, rd_in
                          | hit_q, rdata_q                  v
                          +-------------> output_mux <--- sram (memory under test)
                                              |
                                           data_out
```

`bisr_top` wires these together. `test_mode` selects between the two modes:

* **Test and repair** (`test_mode = 1`): `start` runs the stored test; the
  input multiplexer gives the memory to the controller; every mismatch
  programs a redundant word.
* **Normal** (`test_mode = 0`): `addr_in`, `data_in`, `wr_in`, `rd_in` reach
  the memory; accesses to a repaired address also go to its redundant word,
  and reads of it are answered by that word.

## The microword

| bit | field | meaning when 1 |
|-----|-------|----------------|
| 6 | `valid` | a real operation (0 = end of test) |
| 5 | `fo` | first operation of a multi-operation element |
| 4 | `io` | in-between operation of a multi-operation element |
| 3 | `lo` | last operation of a multi-operation element |
| 2 | `down` | walk the addresses in decreasing order |
| 1 | `wr` | write (0 = read) |
| 0 | `data` | all-ones byte (0 = all-zeros byte), written or expected |

`fo,io,lo = 000` marks a single-operation element. The struct `microword_t`
in `bisr_pkg` holds these fields.

## How an element runs: the pointer loop

This is the part that takes the most explaining. The instruction pointer does
not just count up. After each operation it looks at the `{fo,io,lo}` bits of
the word that has just run and at `over`, a flag from the address generator
that is high while the current address is the last in the element's order:

| word just run | pointer next | address generator |
|---------------|--------------|-------------------|
| `fo` (100) | remember this word as the element's start; next word | holds |
| `io` (010) | next word | holds |
| `lo` (001), not `over` | back to the remembered start word | steps by one |
| `lo` (001), `over` | next word (next element) | holds |
| single (000), not `over` | same word again | steps by one |
| single (000), `over` | next word | holds |

So all operations of an element run on one address, then the pointer jumps
back and they run on the next address, until the last address. At the first
word of each new element the sequencer loads the address generator with 0
(ascending) or the top address (descending), taken from that word's `down`
bit. Every word is fetched from the store each time it runs; nothing is
cached, which is what lets an element be any length.

## The stored test: March BLC

`inst_storage` holds March BLC, 46 operations per address (a 46n test),
followed by end-of-test words:

```
ME0 (w0)
ME1 (r0,r0,w0,r0,w1,w1,r1)   ME2 (r1,r1,w1,r1,w0,w1)   ME3 (r1,r1,w0,w0,r0)
ME4 (r0,r0,w0,r0,w1,w1,w0)   ME5 (r0,r0,w0,w1,w1,r1)   ME6 (r1,r1,w0,w1)
ME7 (r1,r1,w0,w0,r0)         ME8 (r0,r0,w1,w1,w0)
```

The address order of each element is a choice of this implementation:
ME0 to ME4 ascending, ME5 to ME8 descending. The store's contents are computed
at elaboration by `bisr_pkg::march_blc_word` from a table of the nine
elements; to run a different March test, change that table
(`march_blc_len`, `march_blc_dir`, `march_blc_op`). The store has 64 words
(`IA_W = 6`), enough for tests of up to 63 operations.

## Timing

The sequencer (`smc_controller`) spends one clock in each state:

| state | action |
|-------|--------|
| FETCH | store reads the word at the pointer |
| LOAD | instruction register takes it |
| DECODE | end of test if not valid; else load data and read/write generators, and at an element start the address |
| EXEC | memory operation (`MemEna` high for exactly this clock) |
| CMP | reads only: fault diagnosis compares the read data |
| NEXT | pointer moves; address steps at element end if not `over` |

A write takes 5 clocks and a read 6 clocks. Assertions in `smc_controller`
and `rw_control` check that a memory operation lasts one clock and is issued
alone, and that the read and write enables are never both high. March BLC has 23 reads and 23
writes per address, so a 16-word test takes 16 x 253 + 4 = 4052 clocks from
`start` to `test_done` (one idle clock plus three to fetch and decode the end
word). `test_done` stays high until `start` is dropped. A second run needs a
reset (`rst_n`) to bring the pointer back to word 0.

In normal mode the memory and the redundant-word hit are both registered:
`data_out` is valid the clock after `rd_in`. Only one of `wr_in`/`rd_in` may
be high; with both high nothing happens.

## Fault diagnosis and repair

`fault_diag` compares the memory's read data with the data generator's byte
in the CMP clock. On a mismatch it gives a one-clock **fault pulse** with the
**faulty address** and the **correct (expected) data**, and sets the sticky
`fault_found`.

`redundancy_array` holds `N_RED` copies of `redundancy_word`. Each word has a
programmed flag (FA), an address field, a data field and a comparator. On a
fault pulse in test mode:

1. if a programmed word already holds that address, nothing happens (March
   BLC reads a bad word 23 times per run; without this one bad word would
   take every spare);
2. otherwise, if a word is free, the next free word is programmed and the
   fill count `red_used` goes up;
3. otherwise the memory is **not repairable**: `not_repairable` is set and
   stays set until reset.

In normal mode each access's address is compared with all programmed words.
A matching write updates the word's data field (the memory is written as
well); a matching read makes `output_mux` return the word's data instead of
the memory's. Comparison is disabled in test mode, so the test always sees the
raw memory.

## Simulating a faulty memory

`sram` has an input `fault_inject`, one bit per address (top port of the same
name). A read of a marked word returns the stored word inverted, a model of a
deceptive read fault; with all bits zero the memory is fault-free. The bit
is meant for simulation; tie it to zero in a real design.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `ADDR_W` | 4 | top and below | memory address width (16 words) |
| `DATA_W` | 8 | top and below | memory word width |
| `IA_W` | 6 | top, controller, pointer, store | microcode address width (64 words) |
| `N_RED` | 4 | top, redundancy array | number of redundant words |

Address and data widths are the source design's; `IA_W` and `N_RED` are
choices (see below).

## Departures and own choices

* **Program store depth.** The source draws a 5-bit instruction address and
  also mentions 22 instructions, but March BLC as given has 46 operations at
  one operation per word. The store here has 6 address bits so that the whole
  test plus its end word fit.
* **Element address orders** of March BLC (ascending ME0 to ME4, descending
  ME5 to ME8) are chosen here; they are not given.
* **Sequencer states, pointer loop-back rule, address load and `over` flag**
  are this implementation's reading of how the named blocks cooperate.
* **Duplicate-fault filtering** in the redundancy array is added; the source
  flow programs a word on every fault pulse.
* **`N_RED = 4`** redundant words; the source leaves the number open.
* **Reset** is active low, as in the source, and asynchronous by choice.
  Memory contents are not reset.
* A **clock generator** appears in the source's simulation but is not
  described; it is not part of this RTL. One clock drives everything.
* The source's SMC drives a separate enable (RLAEna) into the repair array;
  here the array acts on the fault pulse in test mode and on memory accesses
  in normal mode, which covers the same cases.

## How far it has been checked

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that
compares against a reference model written in the testbench. `tb_bisr_top`
runs the whole design at its default parameters:

* a fault-free run, every one of the 736 memory operations checked against a
  March BLC expansion built in the testbench, plus the 4052-clock run time;
* a deceptive-read fault at address 1011: found, one word used, and normal
  reads of 1011 return the written data;
* five faulty words with four spares: `not_repairable` set;
* three faulty words: all repaired, every address reads back correctly.

It counts fault pulses, word programming, ignored repeated faults, overflow,
mode switches, repaired reads, element loop-backs, descending elements and
single-operation elements, and fails if any never happened. The design has
been linted with Verilator and parsed with the slang front end of Yosys. It
has not been run on an FPGA or put through timing analysis.

## Running the simulations

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/bisr_pkg.sv rtl/*.sv \
    tb/tb_bisr_top.sv --top-module tb_bisr_top -o sim
./obj_dir/sim
```

Replace `tb_bisr_top` by any other `tb_<module>` to test one block. Each
testbench prints `TB_RESULT checks=N failures=M` and stops on its own; a
watchdog ends it with a failure if it hangs.

## Files

* `rtl/bisr_pkg.sv`: microword struct, March BLC table and program builder
* `rtl/bisr_top.sv`: top level
* `rtl/mbist_controller.sv`: controller, built from `inst_ptr`,
  `inst_storage`, `inst_reg`, `addr_gen`, `data_gen`, `rw_control`,
  `smc_controller`, `fault_diag`
* `rtl/input_mux.sv`, `rtl/sram.sv`, `rtl/output_mux.sv`: memory path
* `rtl/redundancy_array.sv`, `rtl/redundancy_word.sv`: repair logic
* `tb/tb_*.sv`: one testbench per module
