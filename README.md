# CDSP: a 16-bit DSP core for symbol-rate WCDMA processing

CDSP is a DSP core tuned for the symbol-rate part of a third-generation
(WCDMA) receiver: channel estimation, RAKE combining, Viterbi decoding and
FIR filtering. Chip-rate despreading is left to a correlator array outside
the core. The core's symbol data then need only a few bits each, so CDSP
splits each 16-bit data word into an 8-bit I half and an 8-bit Q half
(sub-word parallelism, SWP). It also runs several datapath units from one
instruction. Three operations benefit:

* a complex multiply or multiply-accumulate of I/Q samples takes **one
  cycle**;
* a Viterbi path-metric update does **two add-compare-select (ACS)
  operations per cycle**;
* an N-tap FIR filter of 8-bit data takes **N/2 cycles** with a single MAC.

This repository has synthesizable SystemVerilog for the core. It also has
self-checking testbenches that run these kernels on it and check the
results and the cycle counts.

The architecture follows the published CDSP design. That design's
publication does not give an instruction set, so the instruction set, its
28-bit encoding, the pipeline hazard rules, the interrupt details and the
host loading port are this implementation's own. They are marked as such
below and in each file's header.

## Architecture

```
              +-----------+      +-----------------+      +-----------+
              |   DM0     |      | program memory  |      |   DM1     |
              | 2K x 16   |      |    1K x 28      |      | 2K x 16   |
              | 1R + 1W   |      +--------+--------+      | 1R + 1W   |
              +-----+-----+               |               +-----+-----+
                    |                cdsp_seq +                  |
              AG0 (I0..I7,            decode              AG1 (I0..I7,
              modulo)                                     modulo)
                    |  X                                      |  Y
        ------------+----------------+------------------------+--------
              |            |             |             |
            +-----+     +-----+       +-----+       +-----+
            | ALU |     | CMP |       | MAC |       | SFT |     40-bit
            +-----+     +-----+       +-----+       +-----+
              |            |             |             |
        ------+---------- D0 (40) ---- D1 (40) -------+----------------
                        W0 -> DM0, W1 -> DM1
```

* **Memories.** The core uses a modified Harvard organisation. A 1K x 28
  program memory delivers one instruction per cycle. Two 2K x 16 data
  memories, DM0 and DM1, each have one read port and one write port. In
  every cycle the core can therefore read one operand from each memory and
  write one result word to each. Addresses are 16 bits wide. Only the low
  11 bits (data) or 10 bits (program) select a word.
* **Address generators.** Each data memory has its own address
  generator, AG0 or AG1, with eight index registers I0..I7. Each index
  register has a step M, a buffer length L and a base B. An access may
  post-modify the register to I + M, wrapped into [B, B+L) when L is not
  0. This circular addressing serves delay lines and the ping-pong metric
  regions of the Viterbi code. Each generator hands out two addresses per
  cycle, one for the read port and one for the write port.
* **Datapath.** Four units work on two 40-bit accumulators, D0 and D1: the
  ALU, the MAC, the comparator (CMP) and the 40-bit barrel shifter (SFT).
  The operands of an instruction are X and Y, the words read from DM0 and
  DM1 (swapped when the `rsw` bit is set). They can also be the
  accumulators, the two local-distance registers L0/L1 or an immediate.
* **Sequencer.** The sequencer handles jumps and conditional branches. It
  runs a zero-overhead hardware loop, has five interrupt vectors and an
  idle mode.
* **I/O.** A 16-bit parallel port: `pio_in` for data such as correlator
  outputs, and `pio_out` for results or status to a system controller.

### Sub-word formats

A 16-bit data word is either an integer or an I/Q pair, with I in bits
15:8 and Q in bits 7:0. A 40-bit accumulator is either one 40-bit
integer or a *split pair*: bits 39:16 form a signed 24-bit field and
bits 15:0 a 16-bit field. The carry chain is cut between them. Complex
results (real part in the upper field, imaginary part in the lower) and
the two path metrics of an ACS use the split form. Each datapath
instruction can write two words. W0 = bits 31:16 goes to DM0 and W1 =
bits 15:0 goes to DM1 (swapped with `wsw`). A complex result therefore
lands as its real part in DM0 and its imaginary part in DM1.

## The MAC (`cdsp_mac`)

The MAC is built from four 8x8 multipliers:

* the left pair computes X.hi·Y.hi and X.lo·Y.lo;
* the right pair computes X.hi·Y.lo and X.lo·Y.hi, and a 16-bit adder sums
  these two products.

A crossbar feeds the products to a 32-bit middle adder. A carry cut can
split that adder into two 16-bit adders. The final stage is the 40-bit
accumulator adder, which can split into 24 + 16 bits. Each multiplier
takes each byte as signed or unsigned. Internally each is a 9x9 signed
multiplier, which lets the same four multipliers form a full signed 16x16
product.

| mode | computes | middle adder | final adder |
|---|---|---|---|
| MPY/MAC/MSU | D ± X·Y (16x16) | {hh,ll} + (hl+lh)<<8, 32 bit | 40 bit |
| CMPY/CMAC | re = XiYi − XqYq, im = XiYq + XqYi | split: hh − ll, 0 + (hl+lh) | split 24/16 |
| DMAC | D + X.hi·Y.hi + X.lo·Y.lo | hh + ll, 32 bit | 40 bit |
| ACS | upper D − L, lower D + L | bypassed | split 24/16 |

There is no conjugating multiply. For channel estimation, store the pilot
already conjugated.

## Dual add-compare-select

The K=9, rate-1/2 trellis has 256 states. Butterfly k connects the old
states k and k+128 to the new states 2k and 2k+1. One `ACS` instruction
keeps three units busy:

* the **ALU** (split 24/16) writes D0 = {X + L, X − L}, with X = metric(k):
  the candidate metrics from state k to 2k and to 2k+1;
* the **MAC** (multipliers bypassed) writes D1 = {Y − L, Y + L}, with
  Y = metric(k+128);
* the **CMP** takes the D0/D1 left by the *previous* ACS. It writes the
  smaller upper field (new metric 2k) as W0 and the smaller lower field
  (new metric 2k+1) as W1. It shifts its two decisions into the 16-bit
  TRN register (1 = the path from the upper old state won; ties choose the
  lower old state).

The ACS is software-pipelined. The first ACS of a stage writes nothing, and
one extra ACS at the end drains the compare stage. A stage of N states
takes N/2 + 1 instructions. L is the local (branch) distance for the label
of the k → 2k branch, taken from L0 or L1 (`lds` bit). Antipodal labels
are assumed: the k → 2k+1 branch uses −L.

Two reads and two writes every cycle need the metrics spread over both
memories. Metric m is stored in DM0 if (m < N/2 and m even) or
(m ≥ N/2 and m odd), otherwise in DM1, always at address base + m/2.
With this layout:

* the two old metrics of a butterfly are always in different memories.
  For even k, X comes from DM0; for odd k, the `rsw` bit takes X from DM1;
* the two new metrics also go to different memories, at the same address
  (base + k). For the second half of the stage (2k ≥ N/2) the `wsw` bit
  swaps them.

Old and new metrics live in two regions, swapped every stage. Circular
index registers return to the start of their region by themselves, so
the regions need no reloading. `tb/tb_cdsp_viterbi.sv` contains a
complete stage program (`stage()`) to copy from. The stage is two
hardware loops of ACS pairs:

| K | states | cycles per decoded bit (measured) |
|---|---|---|
| 5 | 16 | 20 |
| 9 | 256 | 140 |

Each count covers the ACS, two local-distance loads, a decision store and
the stage loop control. The core does not compute local distances and has
no trace-back unit. Software would read the decision words from memory.

## Pipeline and timing

Five stages, one instruction per cycle:

| stage | work |
|---|---|
| IF | `cdsp_seq` sends the fetch address to the program memory. |
| ID | The instruction is decoded. Both AGs produce their read and write addresses and post-modify their index registers. JMP, LOOP, EI/DI, RETI and IDLE act here. |
| OR | The read addresses go to DM0/DM1 (synchronous read). |
| EX | The operation runs. D0/D1, L0/L1, TRN and `pio_out` are written at the end of the cycle. Conditional branches resolve here. |
| WB | W0/W1 are written to DM0/DM1. |

Rules a programmer needs (these are this implementation's choices):

* **Accumulators** are written at the end of EX, so the next instruction
  sees the new value. There is no accumulator hazard.
* **Memory.** An operand read right after the instruction that wrote it
  is forwarded from WB. One read two instructions later is served by the
  write-first memory. There is no memory hazard.
* **AG registers** are changed by SETAG or by post-modify in ID. The next
  instruction sees the change.
* **JMP/RETI** lose one cycle. A conditional branch (BCC) holds the next
  instruction in ID until the branch resolves. A taken branch loses 3
  cycles; an untaken one loses 2. A taken branch also cancels an active
  hardware loop.
* **LOOP** n, c repeats the n instructions after it c times (c = 0 runs
  them once). There is no cost per pass, and a single-instruction body
  works. There is one loop level. Interrupt handlers must not use LOOP.
* **Interrupts.** A rising edge on `irq[k]` sets a pending bit. With
  interrupts enabled (EI mask) the core fetches from address 1+k. It takes
  an interrupt only when no control instruction is in flight. The
  interrupted fetch address is saved; RETI returns to it and re-enables
  interrupts. Handlers do not nest, and the core saves no registers for
  them.
* **Idle.** IDLE stops fetching until an interrupt that is unmasked in
  IMR is pending. The `idle` output can drive a clock gate outside the
  core.

## Instruction set

The encoding is defined in `rtl/cdsp_pkg.sv` and the assembler functions
are in `tb/cdsp_asm_pkg.sv`. Bit 27 selects the format.

**Datapath format** (`0 | op[5] | xr xm | yr ym | wxr wxm | wyr wym | we0 we1 | dst rsw wsw lds`):

* xr/yr: the AG0/AG1 index registers for the reads; xm/ym post-modify
  them.
* wxr/wyr: the index registers for the writes; wxm/wym post-modify them.
* we0/we1: write W0 to DM0 and W1 to DM1.
* dst: the destination accumulator.

Operations: NOP, LDX, LDY, LDXY, ADDX, SUBX, ADDY, SUBY, ADDE, SUBE, ANDX,
ORX, XORX, MOVE, MPY, MAC, MSU, CMPY, CMAC, DMAC, ACS, MAXE, MINE, ABS,
NEG, STL, STH (E = the other accumulator). A NOP with write enables stores
the destination accumulator's bits 31:16 and 15:0. STL and STH store bits
15:0 or bits 31:16 to both memories.

**Control format** (`1 | op[5] | field[22]`): LDI, LDIH, SFT (signed 6-bit
amount, arithmetic or logical), SETAG (load I/M/L/B of one index
register), LDLD (L0/L1 from an accumulator), JMP, BCC (EQ NE LT GE GT LE
on an accumulator), LOOP, IN, OUT, IDLE, EI (with mask), DI, RETI, RDTRN.

## Host port and integration

While `run` is low, the core sits at address 0 and the host owns the
memories:

* `host_sel` selects the program memory (0), DM0 (1) or DM1 (2);
* `host_we` writes `host_wdata` at `host_addr`;
* `host_rdata` returns a word one cycle after its address.

Raise `run` to start execution at address 0. Address 0 normally holds a
jump past the vectors at 1..5. In a full baseband receiver, `irq` comes
from the system controller, `pio_in` carries correlator-array results and
`pio_out` reports status. The correlator array, the code generators and
the system controller are not part of this core.

## Where this core departs from the published design

* **Operand buses.** The original routes operands over the two memory
  buses plus three local data buses between the units and the
  accumulators. Here each unit's operand is chosen by a multiplexer from
  X, Y, D0, D1, L0/L1 or an immediate. The sources are the same, but the
  number of physical buses is not modelled.
* **Index register names.** The original calls the registers of the two
  generators Am0..Am7 and Bm0..Bm7. Here both sets are I0..I7 with their
  M, L and B fields; the index-register fields of an instruction select
  them.
* **Trace-back.** The original adds a trace-back unit of a separate
  design for constraint lengths 5 to 9. This core only produces the
  decision bits (TRN, stored to memory). The metric update handles K = 5
  to 9 as programs; the test runs K = 5 and K = 9.
* **Cycle counts.** For K = 9 the measured 140 cycles per bit agrees with
  the published 1.38 MIPS at 9.6 kbit/s (about 144 cycles per bit). For
  K = 5 the stage code here takes 20 cycles per bit. The published
  0.093 MIPS is about 10 cycles per bit at GSM's 9.45 kbit/s coded rate. The 9 ACS cycles of a stage are the same (measured),
  but the other 11 cycles are fixed per-stage work: four instructions to
  load the two local distances, reading TRN and storing it, and loop
  control. The published figure must count less of that work; its breakdown
  is not given. Unrolling the stage would save only
  the two LOOP instructions.
* **Not published at all:** the instruction set and its encoding, the
  hazard rules, interrupt priority and return, and the host port. All of
  these are this design's own.

## Files

| file | contents |
|---|---|
| `rtl/cdsp.sv` | top: pipeline, accumulators, operand steering, forwarding, host port |
| `rtl/cdsp_pkg.sv` | instruction encoding, operation enums, pipeline struct |
| `rtl/cdsp_seq.sv` | program sequencer: fetch, loop, interrupts, idle |
| `rtl/cdsp_ag.sv` | address generator with modulo addressing |
| `rtl/cdsp_alu.sv`, `cdsp_mac.sv`, `cdsp_cmp.sv`, `cdsp_sft.sv` | datapath units |
| `rtl/cdsp_dmem.sv`, `cdsp_pmem.sv` | data and program memories (arrays) |
| `tb/tb_*.sv` | self-checking testbenches, one per unit |
| `tb/tb_cdsp.sv` | end-to-end program: channel estimation, FIR, one K=9 ACS stage, forwarding, branches, interrupts, idle |
| `tb/tb_cdsp_viterbi.sv` | multi-stage metric update for K=5 and K=9 |
| `tb/tb_cdsp_fir.sv` | 16-tap FIR over ten outputs with the overlapping coefficient-row layout |
| `tb/cdsp_asm_pkg.sv` | instruction encoders used by the test programs |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/cdsp_pkg.sv tb/cdsp_asm_pkg.sv tb/tb_cdsp.sv --top-module tb_cdsp
./obj_dir/Vtb_cdsp
```

Replace `tb_cdsp` with any other `tb_*` module to run that test. All
testbenches use the default sizes (1K program words, 2K data words per
memory) and finish in well under a second.

What the tests establish:

* Every unit is compared with an independent reference on random and
  directed operands.
* The end-to-end tests check all results against reference models written
  in the testbench. They also check these cycle counts: 8 complex MACs in
  8 cycles; 24 FIR taps in 12 cycles; a 16-tap FIR output in 8 or 9 MAC
  cycles from coefficients stored as overlapping rows {a(r-1), a(r)}; a
  256-state metric update (128 dual ACS) in 131 cycles, including the loop instructions.
* Each mechanism has been seen to occur at least once: hardware loop,
  interrupts, idle, taken branch with hold, both forwarding paths and
  circular-buffer wrap.

Not covered: gate-level timing (the original chip ran at 40 MHz in a
0.35 µm process), and the process-specific memories and pads. The memories
here are plain arrays. Replace them with SRAM macros of the same ports
for a real implementation.
