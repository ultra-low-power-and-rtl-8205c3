# ACARM7: a low-power ARMv4 core in a two-bank JPEG decoding system

ACARM7 is a 32-bit embedded processor that runs the ARMv4 instruction set
without Thumb and without coprocessor instructions. It keeps the classic
three-stage fetch / decode / execute pipeline, but puts all the work of an
instruction in the execute stage under a small main state machine with four
sub-machines (load/store, shift, multiply, branch). Multiplication uses a
small 32 x 8 multiplier over several cycles instead of a full 32 x 32 array,
and a 64-bit adder that serves both the ALU and the multiply accumulator.
Power is saved by enabling each register only when it must change, and by
forcing the inputs of idle arithmetic units to zero.

The core is wrapped for an FPGA logic tile next to a host processor. The
host writes a program and its data into one of two 2 MB ZBT SRAMs, tells the
core to run from that bank, and polls a FINISH flag. While the core works on
one bank, the host fills or drains the other. That is how JPEG images are
decoded two at a time.

This repository holds synthesizable SystemVerilog for the core and for the
AHB-side system logic: bus decoder, read multiplexer, interface state
machine with control registers, and the two ZBT SRAM controllers with
their bank multiplexers. It also holds self-checking test benches for every
module, and an end-to-end test. The test plays the host and runs two
decoder kernels on the core, one in each bank.

## Block map

```
jpeg_sys_top                      AHB slave side of the logic tile
 ├─ ahb_decoder                   HADDR -> slave select
 ├─ ahb_mux                       data-phase read data / ready selection
 └─ ahb_wrapper
     ├─ ahb_if                    interface FSM, CSRs, and the core:
     │   └─ acarm7_core
     │       ├─ decoder           instruction -> dec_t record
     │       ├─ regfile           30 banked registers, CPSR, 5 SPSRs
     │       ├─ forwarding_unit   bypass of the pending write-back
     │       ├─ barrel_shifter    5 log stages + final stage
     │       ├─ alu               reverse-inverse mux, logic unit, fong_adder (64 bit)
     │       ├─ ling_mul_32x8     40-bit partial products
     │       ├─ mul_fsm           multiply sequencing (C0, ACC, A1..A4, HI)
     │       ├─ rw_data_sel       load alignment / store lane replication
     │       └─ addr_reg          PC with incrementer / ALU / LDM / vector mux
     ├─ ahb_zbt_port  x2          host side of each bank multiplexer
     └─ zbt_ctrl      x2          ZBT SRAM pin sequencing
```

`acarm7_pkg` holds the shared types: modes, the PSR record, the decoded
instruction record, and the mapping of registers onto physical banked
registers.

## The execute stage and its state machines

Fetch and execute share one memory port. Fetch reads the word at the PC
into the IF/ID register whenever the execute stage does not need the bus
and the decode slot is free or is being consumed. A data access in execute
blocks fetch for that cycle. The whole core stalls while a requested access
has `bus_ready` low.

Registers are read in the execute stage, not in decode. Two read ports
address physical registers chosen by the current mode, or by the user bank
for `LDM/STM ^`. A result is not written to the register file at once. It
is held in a write-back register for one cycle, and the forwarding unit
gives that pending value to the next instruction if it reads the same
physical register. `fwd_used` reports such a bypass. r15 reads as the
instruction's address + 8, or + 12 in the second cycle of a register-shift
instruction and as store data.

The execute stage is a main state plus sub-states (`ex_state_o`):

| state | entered by | what happens |
|---|---|---|
| `ST_MAIN` (0) | every instruction | single-cycle data processing, MRS/MSR, condition fail, address cycle of LDR/STR (with base write-back), start of LDM/STM (address, LDM write-back), C0 of a multiply, branch target computation, exception entry |
| `ST_SHIFT` (1) | data processing with a register shift amount | MAIN read Rs; this cycle shifts by it and completes |
| `ST_LS_DATA` (2) | LDR/STR/LDRH/STRH/SWP | the data transfer |
| `ST_SWP_W` (3) | SWP | the write half of the swap |
| `ST_LSM` (4) | LDM/STM | one word per cycle, lowest register first, until the list is empty |
| `ST_MUL` (5) | MUL, MLA, UMULL, UMLAL, SMULL, SMLAL | sequenced by `mul_fsm`, see below |
| `ST_BR2` (6) | any PC write | the pipeline was flushed; this cycle lets fetch read the target |

Any instruction that writes r15 goes through the branch sub-machine. This
includes B/BL/BX, data processing with Rd = 15, LDR pc, `LDM {..pc}`, and
exception entry. The PC is loaded through `addr_reg` from one of four
sources: the incrementer, the ALU, the loaded value, or an exception vector.
The pipeline is then flushed, and `ST_BR2` covers the refill. A taken
branch therefore spends two cycles in execute: one computes the target and
one lets fetch read it. `MOVS pc, lr`, `SUBS pc, lr, #4` and
`LDM {..pc}^` restore the CPSR from the SPSR.

Exceptions follow the ARM rules. Reset enters SVC mode with I and F set and
the PC at 0. Undefined instructions include every coprocessor encoding.
SWI, IRQ and FIQ are also taken. IRQ and FIQ are sampled between
instructions. An exception is injected as a pseudo-instruction that writes
the banked r14 and SPSR, switches mode, masks IRQ (and FIQ for FIQ), and
branches to the vector. There is no abort input, because the bus in this
system never signals an error.

The combinational part of execute is split into three blocks that feed
each other in one direction only:

1. operand selection for the shifter, ALU, multiplier and load data;
2. sequencing and bus control;
3. write-back of registers, PSRs and PC.

None reads a value produced by a later one, so the datapath has no
combinational loop.

## Multiplication on a 32 x 8 multiplier

A multiply consumes the 32-bit multiplier one byte per cycle. Each 40-bit
partial product is added into a 64-bit accumulator one cycle after it is
formed, shifted to its byte position, through the same 64-bit adder the ALU
uses.

| state | work |
|---|---|
| C0 (in `ST_MAIN`) | read Rm and Rs, form partial product 0 |
| ACC | only for MLA/UMLAL/SMLAL: read Rn or RdHi:RdLo into the accumulator |
| A1 … A4 | add the previous partial product, form the next; the last A writes Rd / RdLo and the flags |
| HI | only for long forms: write RdHi |

The multiply stops early once the remaining multiplier bytes are all zero
(unsigned) or all copies of the sign bit (signed). For signed forms, the
top used byte is multiplied as a signed value. The length is therefore:

    cycles = 1 + bytes_used (1..4) + accumulate (0/1) + long result (0/1)

which ranges from 2 to 7 cycles. For example, `MUL` by a small constant
takes 2 cycles, and `UMLAL` with a full 32-bit multiplier takes 7. The
core test checks these lengths for five cases.

## ALU and shifter

The barrel shifter is a logarithmic shifter with five stages (shifts of
1, 2, 4, 8 and 16) on a 33-bit word that carries the carry-out. A final
stage handles the ARM special cases:

- LSL #0 passes the value;
- LSR/ASR #0 in the immediate form means 32;
- ROR #0 in the immediate form means RRX;
- register amounts of 32 or more.

In the ALU, a reverse-inverse multiplexer swaps the operands for RSB/RSC and
inverts the subtrahend. Logic operations then use the logic unit, which
sets N and Z, takes C from the shifter, and leaves V. Arithmetic uses the
upper half of the 64-bit adder. The lower half of one adder input is filled
with ones and the other with zeros, so that the carry-in enters bit 32; the
sum is the same as adding the carry-in separately. The unit not in use, and
the multiplier when no multiply runs, get all-zero inputs.

## System side

### Interface state machine

`ahb_if` holds the core, its control and status registers, and a
seven-state machine (`if_state`):

| code | state | meaning |
|---|---|---|
| 0 | Idle | no CSR transfer |
| 1 | Write | data phase of a host write to a CSR |
| 2 | Read | data phase of a host read of a CSR |
| 3 / 4 | Pre-Run0 / Pre-Run1 | one cycle: core held in reset, FINISH cleared, bank chosen |
| 5 / 6 | Run0 / Run1 | the core runs from address 0 of ZBT SRAM 0 / 1 until it signals completion, then Idle |

A write to START0 or START1 is the decoding request. It moves the machine
from Idle, Write or Read into Pre-Run0 or Pre-Run1. Pre-Run always moves on
to the matching Run state. Outside the Run states the core is held in
reset, so every task starts from a clean core at address 0.

CSR map, relative to the CSR window:

| offset | name | access |
|---|---|---|
| 0x00 | START0 | write: run from bank 0 |
| 0x04 | START1 | write: run from bank 1 |
| 0x08 | FINISH | read: bit 0 set when the core signalled completion |
| 0x0C | IRQ | bit 0 drives the core's IRQ, bit 1 its FIQ |
| 0x10 | STATE | read: FSM state in bits 2:0, bank in bit 4 |

The core signals completion by storing to its own address 0x8000_0008. For
the core, any address with bit 31 set is this local register space, and a
load from it returns FINISH. Every other core access goes to the SRAM of
the running bank. Host writes to the CSRs are ignored during Run; host
reads are answered, so FINISH can be polled.

### Address map and banks

| HADDR[23:21] | slave |
|---|---|
| 0 | ZBT SRAM 0 (2 MB) |
| 1 | ZBT SRAM 1 (2 MB) |
| 2 | CSRs |
| 3 | AHB-APB system (outside this design, ports of the top) |
| 4-7 | default slave: zero data, no wait |

Each bank has a multiplexer in front of its controller. Bank *k* belongs to
the core in Run *k* and to the host otherwise. A host transfer to a bank the
core owns waits, with HREADYOUT low, until the core has finished. The owner
of an SRAM access is fixed in its command cycle, so a change of owner never
splits an access.

`zbt_ctrl` assumes a flow-through ZBT SRAM, 512K x 32. The command (chip
enable, word address, write enable, byte enables) goes out in one cycle.
Read data returns, or write data is driven, in the next cycle. Each access
therefore takes two cycles, and an AHB transfer to SRAM has one wait state.

## Where this design departs from, or adds to, its source

The source describes the structure, the state machines and the cycle
counts. The following are this design's own choices:

- The adder and the multiplier are written behaviourally (`+` and `*`).
  The source uses specific fast low-power circuits for both and does not
  describe them.
- The clock-gating cells of the power-saving scheme are not instantiated.
  Registers carry enables, which a synthesis flow converts into gated
  clocks.
- The sub-state names and encodings, and the split of load/store into
  separate states, are this design's.
- Registers are read in execute, with a one-entry write-back bypass.
- A single load takes two execute cycles: address, then data. The source
  has the loaded value written back in a further cycle in the main state.
  Here the write-back register does that while the next instruction
  already executes.
- The CSR layout, the START-by-address request, the core's finish address,
  the address map, and the ZBT SRAM protocol are all assumed.
- There is no abort exception.
- The AHB-APB system (bridge, LED, interrupt controller), the host
  processor, SDRAM, flash, LCD and the SRAM chips are outside the design.
  The push-button interrupt reaches the core through the `ext_irq` port, or
  through the IRQ register.

## Verification

Every module has a self-checking bench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| bench | what it does |
|---|---|
| `tb_barrel_shifter`, `tb_fong_adder`, `tb_ling_mul_32x8`, `tb_alu` | thousands of random vectors against reference arithmetic, including ARM shift special cases and all flags |
| `tb_regfile`, `tb_forwarding_unit`, `tb_addr_reg`, `tb_rw_data_sel`, `tb_decoder` | random or directed checks of banking, bypass, source selection, lane handling, instruction classes |
| `tb_mul_fsm` | multiply lengths from 2 to 7 cycles |
| `tb_acarm7_core` | a hand-assembled program with random memory wait states (see below); also checks multiply cycle counts and that each mechanism happened |
| `tb_acarm7_random` | 40 programs of 60 random conditional instructions: data processing, multiplies, word/byte/halfword/signed loads and stores, LDM/STM and SWP. Operands, flags, shift amounts and wait states are random. IRQ and FIQ requests arrive at random times, sometimes together, and their handlers return at once. Registers, flags and the 256-byte scratch area are compared with an instruction-set model in the bench |
| `tb_zbt_ctrl` | random sized accesses against `zbt_sram_model`, two cycles each |
| `tb_ahb_zbt_port` | AHB transfers with random response delay and a busy bank |
| `tb_ahb_decoder`, `tb_ahb_mux` | address map and data-phase selection |
| `tb_ahb_if` | CSR accesses, all seven states, Pre-Run reset, and a small program that signals FINISH, in both banks |
| `tb_ahb_wrapper` | both banks over AHB, and a run in each bank with concurrent host access to the other |
| `tb_jpeg_sys_top` | end to end at full size (see below) |

The core test program covers:

- ALU, shifts, flags and conditions;
- every multiply form;
- byte, halfword and signed transfers;
- LDM/STM with write-back;
- SWP and BL;
- SWI, an undefined instruction, and an IRQ.

`tb_jpeg_sys_top` runs the top with its defaults: two 2 MB SRAM models,
with the bench as AHB host. It writes two programs and their data over AHB,
writing one plane byte by byte.

- Bank 0 runs a YCbCr-to-RGB conversion of 64 pixels. It uses
  fixed-point multiplies, arithmetic shifts, and clamping with conditional
  moves. A push-button interrupt arrives once during the run; its handler
  counts in a banked register.
- Bank 1 dequantises 64 signed coefficients, and keeps a signed 64-bit
  sum with SMLAL stored by STM.

The bench reads the results and compares them with its own model. It also
counts each mechanism and fails if one never happened:

- every FSM state;
- a host wait on the owned bank;
- host byte writes;
- core reads and writes in each bank;
- forwarding;
- multiply cycles;
- exactly one interrupt entry.

`tb/zbt_sram_model.sv` is the behavioural SRAM used by the benches.

### Running a bench

With Verilator 5, from the repository root. The core-level benches need only
the core files; listing all of `rtl/` is simplest:

```
verilator --binary --timing --assert -Irtl rtl/acarm7_pkg.sv \
  $(ls rtl/*.sv | grep -v acarm7_pkg) tb/zbt_sram_model.sv tb/tb_jpeg_sys_top.sv \
  --top-module tb_jpeg_sys_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_jpeg_sys_top` with any other bench name. `tb_acarm7_random`
takes a different random program with `+verilator+seed+N` on the
simulator's command line. Each bench finishes
in well under a second of simulation.

Test programs are hand-assembled in the benches by small encoder
functions, such as `dpi`, `dpr`, `ldst`, `mul`, `mull` and `br`. To try
other code, add `emit(...)` lines, or write machine words into the SRAM
from the host tasks.

## Limits

- No cache, MMU or Thumb state. The T bit is kept at 0.
- BX ignores bit 0 of the target.
- No abort exception.
- The core was checked with directed programs and with random
  instruction streams, not with a compiled benchmark. Dhrystone and the full JPEG decoder have not been run;
  programs of that size fit easily in one 2 MB bank.
- Timing and power were not measured.
