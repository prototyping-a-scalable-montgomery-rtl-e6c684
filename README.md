# Scalable Montgomery multiplier with an EPP host bridge

This design computes the Montgomery product

    S = X · Y · 2^-n  mod M        (n-bit odd modulus M, X, Y < M)

using the multiple-word radix-2 Montgomery algorithm (MWR2MM). The hardware
is scalable: the width of the datapath (word size `W`) and the number of
processing elements (`K`) are set independently of the operand size `n`.
A pipeline of `K` elements handles `K` bits of X in each pass over the
operand words. Operands longer than `K` bits take `ceil(n/K)` passes. Any
`n` up to the memory size `NMAX` runs on the same hardware.

The multiplier sits behind a small 32-bit register interface. For
prototyping on an FPGA board, a bridge connects that interface to a PC
parallel port in EPP mode, so that a host program can load operands, start
a multiplication and read back the result.

Default configuration: `W = 16`, `K = 28`, `NMAX = 2048`, carry-save
processing elements. This is the 16-bit word / 28-stage configuration
evaluated in the original work, at up to 2048-bit operands.

## The algorithm as the hardware runs it

X is consumed one bit per step and Y, M, S one W-bit word at a time. One
step (an "i-iteration") computes, over the whole word string,

    t  = S + x_i · Y
    q  = t mod 2
    S' = (t + q · M) / 2

Each pass carries `e = ceil(n/W) + 1` words. The extra top word holds the
growth of S. After n steps, S = X·Y·2^-n mod M, up to one extra M
(0 ≤ S < 2M). There is no final subtraction, as in the original algorithm.
The result therefore has `e·W` bits, and software subtracts M if it needs a
fully reduced value.

The important observation is this: word j of S' needs word j+1 of t,
because the shift takes that word's lowest bit. So a step can start on
word 0 two cycles after the previous step started. That is why the
pipeline works: element k runs step i+k two cycles behind element k-1, and
all K elements work on different steps at once.

## Processing elements

Each processing element (PE) performs one i-iteration, word by word. It
takes x_i with word 0 and decides at word 0 whether M is added (`q` is
kept in a flip-flop for the rest of the iteration). Every output leaves
exactly two cycles after its input. In the cycle after the last word, the
PE emits the top word of S'. That "flush" cycle may be word 0 of the next
iteration, so iterations can follow back to back.

* **Version 1, `mwr2mm_pe_csa` (default).** S stays in carry-save form as
  a sum word and a carry word.
  * A first carry-save adder adds x_i·Y to the incoming S.
  * A second one adds M or zero.
  * The shift takes the LSB of the second sum as the MSB of the outgoing
    sum word.
  * The carry word is delayed by one word.
  * The carry bit that overflows the first adder is kept and fed in as
    bit 0 of the next word's carry.

  No carry ever propagates across the word, so the cycle time does not
  depend on W.
* **Version 2, `mwr2mm_pe_cpa`.** Two ordinary (carry-propagate) adders per
  word. A carry of 0, 1 or 2 is kept between words. S is a plain binary
  word, which halves the S registers.

Both versions have the same timing and the same ports (version 2 has no
carry-word port). `PE_VERSION` selects between them in the pipeline.

Each PE also has an enable (`act_i`, taken with word 0). A disabled PE
passes S through unchanged. It is used in the last pass when fewer than K
bits of X remain.

## Pipeline and sequencer

`mwr2mm_pipeline` chains K PEs. Words leave stage K-1 exactly 2K cycles
after they enter stage 0. The X bits of a pass are held as a K-bit vector,
and PE k takes its bit 2k cycles after word 0 enters.

`mm_control_unit` runs the operation:

1. **X prefetch.** X bits for the next pass are read one per clock into a
   K-bit register. They are forwarded directly into the pipeline in the
   cycle the pass starts.
2. **Pass 0** streams Y and M from the operand memories, with S = 0.
3. **Later passes** take Y, M and the partial S from the pipeline output.
   If word 0 of pass p comes out of the pipeline before pass p-1 has fed
   its last word, the words wait in the **loop FIFO** (`mm_loop_fifo`).
   Otherwise they **bypass** the FIFO and go straight back in.
4. **Final pass.** The output S words, in carry-save form for version 1,
   go through a W-bit adder with a carry flip-flop. The adder turns them
   into binary words, which are written into the result memory.

This gives two timing regimes, both measured in simulation.

| case | cycles from word 0 of pass 0 to the last result word |
|------|------|
| `e ≤ 2K` (operand fits in the pipeline) | `2K·ceil(n/K) + e` |
| `e > 2K` (words wait in the loop FIFO)  | `e·ceil(n/K) + 2K` |

The first line matches the cycle count of the original work exactly. For
the second case the original gives `e·ceil(n/K) + 2(K-1)`. This
implementation takes 2 cycles more, because the last word of the last pass
still has to cross all 2K pipeline registers. Examples at the defaults:

* 128-bit operands: 289 cycles.
* 256-bit operands: 577 cycles.
* 1024-bit operands: 2461 cycles (formula: 2459).
* 2048-bit operands: 9602 cycles (formula: 9600).

The number of passes ("wrap count") is a control-register field that the
host writes as `ceil(n/K)`.

## Register interface (`mm_io_unit`, `mm_hardware`)

`mm_hardware` is the multiplier as a chip. Its pins are clock, reset_n,
cs_n, addr[3:0], data[31:0] (split here into `data_i` and `data_o`), rd_n,
wr_n and irq. The bus is synchronous:

* A register is written at the clock edge where cs_n = wr_n = 0.
* Read data is combinational while cs_n = rd_n = 0.
* A result read pops one word per cycle.

| addr | register | access |
|------|----------|--------|
| 0 | status | read |
| 1 | control | read/write |
| 2 | cycle count of the last multiplication (this implementation's use of a reserved slot) | read |
| 3 | reserved, reads 0 | - |
| 4 | M operand FIFO | write |
| 5 | X operand FIFO | write |
| 6 | Y operand FIFO | write |
| 7 | result FIFO | read |

The register addresses, and the use of FIFOs behind the operand and result
registers, follow the original design. The bit layouts are this
implementation's own.

* **Control register:**
  * `[0]` START.
  * `[1]` IRQ_CLR.
  * `[2]` SOFT_RST.
  * `[7:4]` operation (0 = multiply, the only one defined).
  * `[19:8]` n.
  * `[31:20]` wrap count.

  START, IRQ_CLR and SOFT_RST are write-one pulses.
* **Status register:**
  * `[0]` busy.
  * `[1]` done.
  * `[2]` irq.
  * `[3..5]` X/Y/M full.
  * `[6..8]` X/Y/M empty.
  * `[9]` result empty.
  * `[23:16]` result words available.

Each operand FIFO holds `NMAX/32 + 1` words of 32 bits, least significant
word first. The control unit reads the operand memories at random: bit i of
X, and word j of Y and M at any bit offset, so any W from 2 to 32 works.
The result memory is written W bits at a time and read by the host as
`ceil(e·W/32)` 32-bit words, least significant first.

A host runs a multiplication as follows:

1. Write the control register with n, the wrap count and the operation.
2. Write the X, Y and M words.
3. Write START.
4. Wait for irq, or poll the done bit.
5. Read the result words.
6. Write IRQ_CLR.

Operand writes while busy are ignored. The operand FIFOs are emptied when
the operation completes.

## EPP bridge (`epp2mm`, `mm_write_fsm`, `mm_read_fsm`)

The parallel port moves one byte per handshake. The bridge provides three
registers:

* a 4-byte write buffer,
* an address/control byte (bits 3..0 = MM address, bit 6 = C2, bit 7 = C3),
* a 4-byte read buffer.

The host driver uses two sequences:

* **MM write:** four EPP data writes (bytes 0..3, least significant
  first), then address writes `0x80|a` and `a`.
* **MM read:** address writes `0x40|a` and `a`, then four EPP data reads.

Raising C3 (or C2) and dropping it again drives a three-state one-shot
machine: INITIAL DISABLE, then WRITE ONCE (or READ ONCE), then SECOND
DISABLE. It drops wr_n (or rd_n) for exactly one clock, so one FIFO word is
written or popped per request. The machine only re-arms after it has seen
C3 (C2) low.

All EPP inputs are sampled by the 50 MHz board clock through two-flop
synchronisers. Strobes last hundreds of nanoseconds, so each is sampled
many times. The byte counters advance when a sampled strobe is released.
The original prototype clocked its buffers from the strobes. This design
keeps everything in one clock domain instead.

The other bridge signals:

* WAIT_n is the sampled strobe: high once the bridge has seen the strobe,
  low after it is released.
* The AD bus is driven only while the host holds a read strobe.
* INTR_n is the inverted irq.
* The EPP RESET_n line resets the bridge and the multiplier.

`mm_proto_top` is the FPGA contents: bridge plus multiplier, with the EPP
pins as ports. The AD bus is split into in, out and output-enable signals
for the pad's tri-state buffer.

## Files

* `rtl/mm_pkg.sv`: register addresses, bit positions, state type.
* `rtl/mwr2mm_pe_csa.sv`: processing element, version 1 (carry-save).
* `rtl/mwr2mm_pe_cpa.sv`: processing element, version 2 (carry-propagate).
* `rtl/mwr2mm_pipeline.sv`: chain of K processing elements.
* `rtl/mm_loop_fifo.sv`: FIFO for words that loop back to stage 0.
* `rtl/mm_control_unit.sv`: sequencer.
* `rtl/mm_io_unit.sv`: registers and memories.
* `rtl/mm_hardware.sv`: the multiplier behind its register bus.
* `rtl/mm_write_fsm.sv` and `rtl/mm_read_fsm.sv`: one-shot machines.
* `rtl/epp2mm.sv`: EPP bridge.
* `rtl/mm_proto_top.sv`: FPGA top level.

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=… failures=…`:

| testbench | what it checks |
|-----------|----------------|
| `tb_mwr2mm_pe_csa`, `tb_mwr2mm_pe_cpa` | one PE against integer arithmetic, the 2-cycle delay, back-to-back and disabled iterations |
| `tb_mwr2mm_pipeline` | both versions at K = 28, the 2K latency, partial passes |
| `tb_mm_control_unit` | sequencer with both pipelines at W = 8, K = 4: results, cycle formula in both regimes, loop FIFO use, soft reset |
| `tb_mm_io_unit` | register map, operand extraction for W = 16 and W = 12, result packing, irq |
| `tb_mm_hardware` | the multiplier over its register bus at the default size: n = 64 … 2048 |
| `tb_mm_write_fsm`, `tb_mm_read_fsm` | one-shot machines against a reference model |
| `tb_epp2mm` | the bridge with an EPP host model and a behavioural register file |
| `tb_mm_proto_top` | the whole design at default parameters through the EPP port |
| `tb_mm_proto_top_cpa` | the same end-to-end run with the carry-propagate PEs (`PE_VERSION = 2`) |

`tb_mm_proto_top` is the end-to-end test. It multiplies at 128, 256, 1024
and 2048 bits plus two sizes with a partial last pass. It counts each
mechanism (both timing regimes, partial pass, loop-FIFO bypass and storage,
one-shot pulses, interrupts) and fails if one never happened. It takes
about 20 s.

Results are checked two ways. The first is a bit-serial model of the same
recurrence. The second is an independent check that `S·2^n ≡ X·Y (mod M)`
and `S < 2M`.

To simulate with Verilator (5.x):

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/mm_pkg.sv tb/tb_mm_proto_top.sv --top-module tb_mm_proto_top
    ./obj_dir/Vtb_mm_proto_top

## What follows the original and what does not

Taken from the original design:

* the MWR2MM algorithm and its carry range {0, 1, 2},
* the two-cycle stagger between stages and the K-stage pipeline,
* the two PE versions (carry-save with a spill bit and an odd flip-flop
  taken at word 0; carry-propagate),
* the cycle count in the `e ≤ 2K` case,
* the chip pins and the register addresses,
* operand and result FIFOs, and the control and status contents (as a
  list),
* the EPP bridge with write buffer, read buffer and address/control byte,
* the C2/C3 bits and the one-shot state machines, sampling by a fast clock,
* the host sequences,
* W = 16, K = 28 and operand sizes up to 2048 bits.

This implementation's own choices:

* everything inside the control unit (X prefetch, loop FIFO with bypass,
  final carry-save to binary conversion, stage enables for a partial last
  pass),
* register bit layouts and FIFO depths,
* the cycle-count register,
* clearing the operand FIFOs at done,
* ignoring operand writes while busy,
* active-low asynchronous resets,
* least-significant-first byte and word order; the EPP byte counters step
  at the end of each byte cycle,
* WAIT_n as the sampled strobe, and the address read returning the
  address/control byte,
* synchronising all EPP inputs instead of clocking buffers from strobes.

Known differences and limits:

* For `e > 2K`, the cycle count is 2 cycles above the original's formula.
* The result is not fully reduced: it can exceed M by up to one M.
* Only multiplication is defined as an operation.
* n is limited to NMAX (2048 by default; the n field has 12 bits).
* The wrap count is not computed by the hardware.
* The host software, the parallel-port hardware and the board are outside
  this RTL.
