# Concurrent error detection and local recovery for a VLSI RISC processor

A processor that has to keep running correctly when its own hardware fails
must find an error within a cycle or two and repair it on the spot. Waiting
for a system-wide restart is too slow. Almost every circuit that does this
job is built from wide XOR gates:

* **Parity generators** catch odd numbers of flipped bits in a register or on a bus.
* **SEC-DED Hamming codes** correct one flipped bit in a stored word and report two.
* **Signature compressors** fold a wide internal-state bus into a few parity bits.
  Two processors running in lockstep can then be compared every cycle over a
  handful of pins.
* **Comparators** check those signatures against each other.

This RTL implements these circuits, plus two complete ways of recovering
locally:

1. **ECC in parallel with the datapath.** A two-read-port register file stores
   each 32-bit word with 7 M-code check bits. Words go to the ALU straight away.
   The checker runs alongside and can abort the operation in the same cycle.
2. **Duplication and comparison with micro rollback.** Two processors compare
   4-bit signatures of their 100-bit internal state every cycle. The comparison
   crosses chip boundaries, so its answer is late. Each register file can
   therefore undo its last few cycles of writes. On a mismatch both processors
   roll back and re-execute. If one of them holds a register whose parity
   fails, that register is first copied over from the other processor.

The design follows the 1989 UCLA technical report *Support for Fault Tolerance
in VLSI Processors* (CSD-890009). That report is largely about the transistor
circuits, their delays and their layout pitch. Those electrical aspects have no
RTL form. What is kept here is the logic of each circuit and how the circuits
connect. Where the report gives only a function, the simplest logic that
performs it was chosen. These choices are listed under "Where this RTL departs
or decides".

## The wide XOR

Three parity generators compute the same function, `parity = ^x`, in the three
circuit styles of the design:

| module | structure | timing |
|---|---|---|
| `xor_tree` | ceil(log2 M) levels of 2-input XOR cells (`xor2_cell`); inputs padded with zeros up to a power of two | combinational |
| `xor_chain` | M switching cells (`switch_cell`) carrying a dual-rail pair | combinational |
| `xor_senseamp` | switching-cell chains whose rails are latched by clocked sense amplifiers (`sense_amp`) | one clocked stage per level |

**Switching-cell chain.** This one is less obvious. The left end of the chain
drives rail 0 high and rail 1 low. A cell whose data bit is 1 swaps the two
rails, and a cell whose bit is 0 passes them straight through. At the right end
you read `even = 1, odd = 0` after an even number of ones, and the reverse after
an odd number. The same logic describes several transistor implementations: an
N-transistor-only chain, two precharged chains (N- or P-precharged) and a
full-transmission-gate dual chain. `xor_chain` stands for all of them.

Its `precharge` input models the precharged variants. While `precharge` is 1,
both rails read 1 and there is no result yet. When it falls, the chain
evaluates. Every user inside this design ties `precharge` to 0 and treats the
chain as combinational. In silicon, a restoring buffer follows every four cells
(`BUF_EVERY`). In logic that buffer is a wire.

**Sense-amplifier generator.** `xor_senseamp` defaults to the two-level form:

* four 8-cell chains, each ending in a sense amplifier;
* a 4-cell chain over the four latched group parities, ending in a last sense amplifier.

A sense amplifier captures on a rising clock edge while `trigger & latch` is 1.
The two-level result therefore appears on the second enabled edge after the
word is applied. `TWO_LEVEL = 0` gives a single 32-cell chain with one sense
amplifier, and a result on the first enabled edge.

## The M-code: SEC-DED for a 32-bit word

Code words are 39 bits. Bits 0..31 are data and bits 32..38 are check bits
c0..c6. `ft_pkg` builds the parity-check matrix in a function, so no table is
stored:

* The column of data bit i is the i-th 3-of-7 combination of rows {a<b<c}, in
  lexicographic order. The three combinations {0,1,2}, {3,4,5} and {0,3,6} are
  skipped.
* The column of check bit c_r is the single row r.

Two properties follow:

* **Every row XORs at most 14 data bits** (13 or 14). The M-code variant of
  Hamming code exists to keep check-bit generation shallow like this.
* **Every column has odd weight.** So the XOR of the syndrome is 1 for any
  single-bit error and 0 for any double-bit error. That is the rule used to
  tell single errors from double errors.

The blocks, in the order data flows through them:

* **`mcode_encoder`**: seven XOR rows, each a 14-cell `xor_chain` fed with the
  data bits of that row. `check[r]` is the parity of row r.
* **`mcode_detector`**: the same rows, each with its stored check bit added,
  give the 7-bit syndrome. A further 7-cell chain XORs the syndrome. The result:

  | syndrome | meaning |
  |---|---|
  | all zero | no error |
  | XOR of its bits is 1 | single error, can be corrected |
  | non-zero, XOR of its bits is 0 | double error |

* **`mcode_decoder`**: turns the syndrome into a one-hot `flip` mask over all 39
  code bits. A matching data column selects that data bit. A single-bit
  syndrome selects that check bit. An odd syndrome that matches nothing
  (3 or more errors) sets `located = 0`.
* **`mcode_correct`**: 39 controlled inverters, `out = in ^ flip`.
* **`ecc_unit`**: the whole one-bus circuit, made of detector, decoder and
  correction. `corrected` means one error was repaired. `uncorrectable` means a
  double error, or an odd syndrome that could not be located. In that case the
  word passes through unchanged.

### Two buses, one decoder

The datapath has two buses, and the register file is read twice per cycle.
Detection and correction are needed per bus, but a syndrome decoder is large.
`ecc_dual_bus` has two detectors and two correctors but only one decoder, and
works in three steps:

1. **Cycle 0.** Both words arrive. `err_a`, `err_b` and `op_abort` are
   combinational, so an error shows in the read cycle itself. If an error shows
   while the block is idle, both words and both syndromes are captured.
2. **Cycle 1.** The decoder serves bus A, if A had an error.
3. **The next cycle.** The decoder serves bus B, if B had an error.

`busy` covers the correction cycles. While `busy` is 1, an error in a new read
still raises `op_abort`, but its words are not captured. The read has to be
repeated after `busy` falls. Each served bus produces either `corr_valid` with the repaired word, or
an `uncorrectable` pulse.

### Register file with ECC in parallel

`ecc_regfile` stores code words. Its read ports are combinational and
unchecked: `rd_a` and `rd_b` go to the ALU at once, while `ecc_dual_bus`
checks the same words beside them. On an error, `op_abort` rises in the read
cycle. The processor must cancel that operation before it writes anything.

The block then corrects the words and writes them back into their registers,
one or two cycles later. The processor can then reissue the operation, and it
will read clean data. `stall` is 1 during write-back, and the normal write port
is ignored then. Reset fills every register with the all-zero code word, which
is a valid code word.

## Duplex checking with micro rollback

This is the main part of the top, and the hardest to follow.

```
  duplex_node (processor 1)            duplex_node (processor 2)
 +---------------------------+        +---------------------------+
 | state bus (100 b)         |        | state bus (100 b)         |
 |   -> interleaved_compr.   |        |   -> interleaved_compr.   |
 | rollback_regfile + parity |        | rollback_regfile + parity |
 +-----+--------------^------+        +-----+--------------^------+
       | sig (4 b)    |                     | sig (4 b)    |
       v              |                     v              |
   +------------------------------------------------+      |
   | duplex_comparator  (mismatch 2 cycles later)   |      |
   +------------------------+-----------------------+      |
                            | mismatch                     |
                            v                              |
   +------------------------------------------------+      |
   | recovery_ctrl: stall, rollback, scan, copy     +------+
   +------------------------------------------------+
     (its outputs go to both nodes: rollback, scan port, copy write)
```

### Signature compression

`interleaved_compressor` computes signature bit k as the parity of data bits
k, k+S, k+2S, and so on. The 32-bit default is four chains of 8 bits. Each
`duplex_node` instantiates it with `W = 100` for its state bus, giving four
chains of 25 bits.

A difference between two words is always caught if it is:

* a single bit;
* any odd number of bits;
* a burst of up to S adjacent bits.

Of random multi-bit differences, 1 − 2⁻⁴ = 93.75 % are caught. The testbench
measures about 93.7 %.

Because of the interleaving, two flipped bits that are a multiple of S apart
cancel out. The end-to-end testbench lays out its state bus with this in mind.

### Comparison

`comparator` models a precharged match line. While `prech` is 1 the line
(`eq`) is high. When `prech` falls, every bit pair that differs discharges the
line.

`duplex_comparator` latches both signatures (edge 1), compares them, and
latches the outcome back on the processor side (edge 2). `mismatch` therefore
refers to the signatures presented two cycles earlier. `flush` drops the
comparisons still in flight.

### Micro rollback (`rollback_regfile`)

A delayed-write buffer holds the last `DEPTH = 4` cycles:

* Every cycle, that cycle's write enters the buffer, or an empty slot if there
  was no write.
* Only the entry that falls off the far end is committed to the register array.
* Reads search the buffer from newest to oldest, then fall back to the array.
  Reading therefore always returns the latest value, with no visible delay.

A rollback of k cycles (`rollback = 1`, `rb_count = k`, 1 ≤ k ≤ DEPTH) marks the
k newest entries invalid. That undoes the writes of the last k cycles. In that
cycle the buffer does not shift, nothing commits, and the write port is
ignored.

Every value carries an even-parity bit:

* A static XOR tree generates it on the write port.
* Each of the three read ports (two for the processor, one scan port for
  recovery) recomputes parity over {parity, data}. A mismatch sets `perr`.

This local check is what tells the faulty processor apart from the good one.

### Recovery sequence (`recovery_ctrl`)

| cycle | event |
|---|---|
| T | `mismatch` seen. This cycle still executes normally. |
| T+1 | `rollback` with `rb_count = RB_DIST = 3`, which undoes cycles T, T−1 and T−2 (the compared cycle and the two cycles during which the comparison was in flight). The comparator is flushed. `stall` rises. |
| T+2 … T+33 | All 32 registers are scanned in both modules, one per cycle. |
| T+34 | `stall` falls, and both processors re-execute from three cycles back. |

During the scan, each register falls into one of three cases:

* **Parity fails in one module only.** The other module's value is written
  into it (`ev_copy`).
* **Parity fails in both modules.** The register is reported with
  `ev_unrecoverable`.
* **No parity error in any register.** The fault was transient, for example on
  a bus or in the ALU. Re-executing the rolled-back cycles is the whole
  recovery (`ev_transient`).

The copy goes through the faulty module's ordinary write port, so it also
passes through the delayed-write buffer. It is visible at once through the read
bypass.

The processors are outside this RTL. When `p_rollback` pulses, each processor
must move its own program counter and pipeline state back by `p_rb_count`
executed cycles. While `p_stall` is 1 it must hold. The top also blocks its
writes and the signature `valid` during that time.

## Top level: `ft_support_top`

Four groups of ports, side by side:

* `p_*`: the duplex pair. Each signal is a 2-entry packed array, where index 0
  is processor 1. The group covers the register-file ports of each processor,
  the 100-bit state buses, the 4-bit signatures (the off-chip pins), the
  recovery outputs and storage-fault injection for test.
* `ecc_*`: the ECC register file, including a fault-injection mask for test.
* `sb_*`: a stand-alone single-bus SEC-DED circuit, for other storage that is
  read one word at a time.
* `sp_*`: the two-level sense-amplifier parity generator.

Parameters and defaults:

| parameter | default | meaning |
|---|---|---|
| `NREGS` | 32 | registers per register file (this design's choice) |
| `DEPTH` | 4 | rollback depth in cycles (this design's choice) |
| `STATE_W` | 100 | state-bus width |
| `S` | 4 | signature bits |
| `RB_DIST` | 3 | cycles rolled back on a mismatch |

The word width (32) and the number of check bits (7) are fixed in `ft_pkg`.
Most of the storage is in the three register files.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/ft_pkg.sv tb/tb_ft_support_top.sv --top-module tb_ft_support_top -o sim
./obj_dir/sim
```

Replace the testbench and the top module name to run any other testbench.

`tb_ft_support_top` runs the whole design at its default parameters. It models
two lockstep processors: step `pc` reads register (3·pc+1) mod 32, adds
pc·0x9E3779B9 and writes register (7·pc+2) mod 32. It then forces each fault
in turn:

* transient faults in processor 2's result;
* storage faults in each module's register file;
* a fault in the same register of both modules;
* single and double ECC faults on one and on both ECC read ports.

Afterwards it compares both register files with a fault-free run of the
program. It counts every mechanism (mismatch, rollback, transient recovery,
copy, unrecoverable, stall, ECC abort, correction, back-to-back shared-decoder
correction, ECC double error, single-bus correction, sense-amplifier parity)
and fails if any of them never happened. It finishes in well under a second.

The simulator is two-state, so every register that gets read is reset.

## Where this RTL departs or decides

* **Electrical behaviour is not modelled.** That covers noise margins,
  precharge voltage, bootstrap circuits, restoring buffers, sense-amplifier
  resolution, and all the delays and areas. The precharged and sense-amplifier
  forms keep their control signals (`precharge`, `trigger`, `latch`, `prech`),
  but in a clocked, two-state model. All of them are active high, as logical
  phase enables. In the circuit, the latch line and the comparator's
  precharge device are active low.
* **M-code bit positions are this design's own.** Only the properties of the
  code follow the original: 7 check bits, at most 14 data bits per check bit,
  odd-weight columns. The syndrome of a given error pattern therefore differs
  from the original code's.
* **Micro rollback is a delayed-write buffer with read bypass.** The original
  only defines the function, rolling state back a few cycles, and refers
  elsewhere for its implementation. The depth (4), the rollback distance (3),
  the 32-register size and the comparator's 2-cycle latency are all choices
  made here.
* **The recovery scan** (all registers, one per cycle, through a dedicated scan
  port) and the stall/flush protocol are choices made here.
* **ECC write-back** of corrected words, the A-then-B correction schedule, and
  dropping processor writes while a correction is pending are choices made
  here.
* **Fault injection ports** (`inj_*`, `ecc_inj_*`) exist only for testing.
* **Known limitation.** An error that escapes comparison is never undone. That
  happens when the signature aliases (about 1 in 16 random multi-bit
  differences), or when the corrupted value has already left the rollback
  window. The two processors then stay diverged. The controller rolls back
  again on every new mismatch and never declares the pair failed.
* A parity fault in a register that is rewritten before it is read is masked,
  which is harmless.

## Files

| file | content |
|---|---|
| `rtl/ft_pkg.sv` | word sizes, code types and the M-code matrix functions |
| `rtl/xor2_cell.sv`, `rtl/xor_tree.sv` | static XOR tree |
| `rtl/switch_cell.sv`, `rtl/xor_chain.sv` | switching-cell chain |
| `rtl/sense_amp.sv`, `rtl/xor_senseamp.sv` | sense-amplifier parity generator |
| `rtl/mcode_encoder.sv`, `rtl/mcode_detector.sv`, `rtl/mcode_decoder.sv`, `rtl/mcode_correct.sv`, `rtl/ecc_unit.sv` | SEC-DED |
| `rtl/ecc_dual_bus.sv`, `rtl/ecc_regfile.sv` | two-bus ECC and the ECC register file |
| `rtl/interleaved_compressor.sv`, `rtl/comparator.sv`, `rtl/duplex_comparator.sv` | signatures and comparison |
| `rtl/rollback_regfile.sv`, `rtl/duplex_node.sv`, `rtl/recovery_ctrl.sv` | micro rollback and recovery |
| `rtl/ft_support_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the end-to-end test |
