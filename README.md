# Space Shuttle reliability test core

A radiation test chip needs storage whose every bit flip can be seen, located
and attributed to the protection scheme that did or did not catch it. This core
is built around that need: a 32 x 32-bit register file made of plain flip-flops
(no SRAM macro), wrapped in four protection mechanisms that can be switched on
one by one or together, and a monitoring unit that counts, for every register,
how often it was written and read and how many errors were detected and
corrected. The monitoring unit is itself duplicated so that an upset in a
counter does not silently corrupt the statistics. The counters are read by a
processor over a Wishbone bus; the register file has its own ports so it can be
driven directly from chip pins or a logic analyser, and it can be clocked
either by the chip clock or, edge by edge, by a clock the experimenter drives.

The design targets the SkyWater 130 nm process as a Caravel user project. The
RTL here is the core logic only; the Caravel harness (management SoC, pads and
the assignment of signals to pins) is not included, and every signal that would
go to it is a port of `space_shuttle_top`.

## Block structure

```
space_shuttle_top
 +- clk_select           chip clock or user clock -> rf_clk
 +- protected_regfile    (rf_clk)
 |   +- reg_bank x 8     4 registers each, own write + read port
 |       +- secded_encoder        check bits on write
 |       +- secded_decoder x 2    primary word, shadow copy
 |       +- tmr_voter
 +- dup_monitor          (rf_clk)
 |   +- monitor_unit x 2 identical copies, 32 regs x 4 counters x 32 bits
 +- wb_counter_if        (wb_clk_i) Wishbone slave, counter readout
```

`shuttle_pkg` holds the sizes (`DATA_W`=32, `NUM_REGS`=32, `NUM_BANKS`=8,
`ECC_W`=7, `CNT_W`=32) and the shared types: `prot_cfg_t` (the four protection
enables), `field_e` (the stored fields of a register) and `cnt_e` (the four
counter kinds).

## What a register stores

Every register keeps six fields, 142 flip-flops in all (4544 for the file):

| field (`field_e`) | width | content |
|---|---|---|
| `FLD_DATA`   | 32 | primary word |
| `FLD_ECC`    | 7  | SECDED check bits of the primary word |
| `FLD_COPY1`  | 32 | second copy (triple redundancy) |
| `FLD_COPY2`  | 32 | third copy (triple redundancy) |
| `FLD_SHADOW` | 32 | shadow copy |
| `FLD_SECC`   | 7  | SECDED check bits of the shadow copy |

A normal write fills all six, whatever protection is enabled. The enables only
decide what the read path looks at, so a mechanism can be switched on at any
moment and immediately protects the words already stored. Nothing is ever
written back: a corrected error stays in storage and is seen again on the next
read, which keeps every upset observable.

### The SECDED code

The code is an extended Hamming code over 39 bits. Data bit *d* sits at the
*d*-th codeword position (counting from 1) that is not a power of two (3, 5, 6, 7,
9, ..., 38). Check bit *i* (0..5) is the XOR of the data bits whose position
has bit *i* set; check bit 6 is the parity of the data and the six Hamming
bits, so a valid codeword has even weight. The all-zero word has all-zero
check bits, which is why reset (all zeros) leaves valid codewords.

On decode, the syndrome (stored Hamming bits XOR recomputed ones) is the
position of a single flipped bit, and the overall parity separates one flip
(odd) from two (even). A syndrome beyond position 38 with odd parity cannot
come from one flip and is reported as a double error.

## The read path: how the protections combine

This is the part that needs the most care. One read of one register runs
through three stages; each enabled mechanism may change the word, raise
"detected", and decide whether the returned word can be trusted ("bad").

1. **ECC** (`cfg.ecc`). The primary word is corrected with its check bits. A
   single error (including a flipped check bit) is detected and repaired; a
   double error is detected and makes the word bad.
2. **Triple redundancy** (`cfg.tmr`). The stage-1 word is voted bit by bit with
   the two copies. Any disagreement is detected. The vote repairs anything
   confined to one of the three; but if stage 1 already marked the word bad and
   the two copies also disagree with each other, two of three are wrong and the
   word stays bad.
3. **Shadow** stage, using the shadow copy:
   * **ECC shadow** (`cfg.ecc_shadow`): the shadow is first decoded with its own
     check bits. If it has no double error it is trusted: a differing word is
     replaced by it, and the result is good even if stages 1-2 had marked it
     bad. If the shadow has a double error the stage-2 word is returned but
     marked bad, since nothing can confirm it.
   * **Plain shadow** (`cfg.shadow`, used only when `ecc_shadow` is off): a
     difference is detected and marks the word bad. A bare second copy cannot
     say which side is right, so nothing is corrected and the primary path's
     word is returned.

The read then reports `det` (any stage saw an error), `corr` = `det` and not
bad, `uncorr` = `det` and bad. With no enable set the register is unprotected
and a flip passes unnoticed.

Some consequences worth knowing:

* Two flips in the same bit position of two TMR copies outvote the good copy;
  with TMR alone this returns a wrong word flagged as corrected.
* The two shadow modes share one stored shadow copy; if both are enabled, the
  ECC shadow behaviour applies.
* With only the ECC shadow enabled, the primary word has no check of its own;
  any difference from a clean shadow is resolved in the shadow's favour.

## Monitoring counters

For each of the 32 registers, four 32-bit counters: writes, reads, reads with
a detected error, reads with a corrected error. A read is counted in the
cycle after it was issued, when its result and flags come out of the register
file. Each bank has one write and one read port, so a counter sees at most
one event per cycle and is a plain incrementer. Counters wrap at 2^32 and are
cleared only by reset.

`dup_monitor` holds two complete, independent copies (registers and
incrementers), fed the same events. Readout returns both values and a flag
that is set when they differ.

### Wishbone address map

`wb_counter_if` answers in a 4 KiB window at `BASE` (default `0x3000_0000`,
the start of the Caravel user-project area). Byte offset bits:

| bits | meaning |
|---|---|
| `[10]`  | 0: counter value; 1: compare word `{31'b0, copies differ}` |
| `[9:5]` | register number 0..31 |
| `[4:3]` | counter: 0 writes, 1 reads, 2 detected, 3 corrected |
| `[2]`   | 0: copy A, 1: copy B |

Offsets from `0x800` up read as zero. A cycle with `cyc` and `stb` is
acknowledged one clock later, for one clock, with the data; writes are
acknowledged and ignored. Addresses outside the window are not acknowledged.
An assertion checks that an acknowledge always follows a request.

## Clocking and reset

`clk_select` feeds the register file and the monitor either with the chip
clock (`wb_clk_i`, `clk_sel_i` = 0) or with `user_clk_i` (`clk_sel_i` = 1).
The selector is a plain multiplexer: change `clk_sel_i` only while both clocks
are low, or a short pulse can reach the registers. The Wishbone slave always
runs on `wb_clk_i`. When the user clock is selected, hold it still while
reading counters, so they do not change under the read.

`wb_rst_i` (active high) resets every flip-flop asynchronously: all stored
fields and counters go to zero.

## Register file ports and timing

Register *r* lives in bank *r*/4 at local address *r*%4. The top's register
file ports are arrays indexed by bank: `we_i`, `waddr_i`, `wdata_i` for the
write port; `re_i`, `raddr_i` for the read port; `rvalid_o`, `raddr_o`,
`rdata_o`, `det_o`, `corr_o`, `uncorr_o` for the read result. All eight banks
can write and read in the same cycle.

* A read issued at clock edge *n* (`re_i` high before it) returns its result,
  flags and `rvalid_o` right after edge *n*, that is, one cycle of latency.
* A write at edge *n* is visible to reads from edge *n*+1 on. A read and a write
  of one register at the same edge return the old word.

The **raw port** (`raw_we_i`, `raw_addr_i` = register number 0..31,
`raw_field_i`, `raw_wdata_i`, `raw_rdata_o`) reads any one stored field
combinationally and writes one field alone, leaving the others as they are.
It is the way to inspect every copy after irradiation, and the way to plant
bit flips on the bench: read a field, XOR a mask, write it back. A raw write
takes precedence over a port write of the same field at the same edge.

`cfg_i` is a plain input; how the chip sets it is outside this core.

## Where this RTL departs from, or goes beyond, the original design

The original description gives the register file size and banking, the two
clock sources, the four protection mechanisms, the duplicated 32-bit counters
and that the counters are read over Wishbone. Everything below is this
design's own choice:

* the SECDED code, its bit order and the choice of SECDED (the description
  asks for single-bit correction; two-bit correction, which it also mentions,
  is not possible with seven check bits on 32 data bits, so doubles are
  detected only);
* the order of checks and the rules for combining mechanisms given above (the
  original says only that they combine "with some limitations");
* writing all copies on every write, and no write-back of corrected words;
* one write and one read port per bank, one cycle of read latency, the bank
  mapping of registers, and the raw port;
* the meaning of "detected" and "corrected" counts, wrap-around counters, the
  compare flag of the duplicated monitor, the Wishbone address map and timing;
* the plain clock multiplexer and the asynchronous reset.

The physical results of the taped-out chip (100 MHz target, 2.22 mm^2,
75,841 cells) are not reproduced here. The Caravel harness, its pin mapping
and its management processor are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_secded_encoder` | Hamming property (XOR of set positions = 0, even weight) for one-hot, random and extreme words |
| `tb_secded_decoder` | clean words, every single flip of all 39 bits, random double flips |
| `tb_tmr_voter` | random triples with 0, 1 or 2 corrupted copies |
| `tb_clk_select` | edge counts from each clock, output follows the selection |
| `tb_reg_bank` | every protection setting and several combinations against planted single and double flips in each field, read latency, raw access |
| `tb_protected_regfile` | all 8 banks written and read in the same cycle, raw access by register number |
| `tb_monitor_unit`, `tb_dup_monitor` | 3000 cycles of random events against a reference count |
| `tb_wb_counter_if` | every counter word, both copies, compare words, writes, outside window, acknowledge timing |
| `tb_space_shuttle_top` | end to end at full size: parallel bank traffic, each protection mechanism, user-clock operation, all 384 counter words over Wishbone against a model; counts each mechanism and fails if one never occurred |

The top-level testbench runs the design at its default size (32 registers,
8 banks, 32-bit counters) in well under a second.

## Simulating

From the directory holding `rtl/` and `tb/`, for example the whole core:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/shuttle_pkg.sv \
    tb/tb_space_shuttle_top.sv --top-module tb_space_shuttle_top -o sim
./obj_dir/sim
```

Any other testbench works the same way by changing the file and top-module
name. For lint: `verilator --lint-only -Wall -Irtl -y rtl rtl/shuttle_pkg.sv
rtl/space_shuttle_top.sv`.

Sizes are parameters of `space_shuttle_top` (`NREGS`, `NBANKS`) and of the
package; `NREGS` must be a multiple of `NBANKS`. The register width and code
are tied to `DATA_W` = 32 and `ECC_W` = 7 in `shuttle_pkg`.
