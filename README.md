# A small sensor-conditioning processor (16-bit ASIP)

Automotive sensor chips (inductive pedal and throttle position sensors, 3D Hall
angle sensors) usually run their signal chain on a hardwired DSP: a state
machine sequences averaging, scaling, offset, clamping and a few
multiplications through one shared ALU. This RTL replaces that DSP with a
tiny application-specific processor. It has 16-bit two's complement data, three
pipeline stages and a RISC instruction set. A few domain instructions are added:
a two-cycle `mul`, a seven-cycle CORDIC `atan`, and `otprd`/`otpwr` for the
parameter OTP. The firmware is interrupt-driven. It initialises, sleeps, and
wakes once per measurement to run the conditioning handler. The time-critical
blocks stay hardwired next to the processor: the coil transmitter, the
phase-shift counter, the packet interface and the test block. The processor
reaches them through a handful of memory-less I/O registers.

The architecture follows a published description of such a processor. That
description gives the feature list, the sizes and the instruction latencies,
but not the encoding or the pipeline internals. Everything in the section
"What is specified and what is chosen here" that is marked as a choice was
decided for this RTL.

## Block diagram

```
            +-------------------------- sensasip_top ---------------------------+
 irq_i ---->|  +--------------------------- sensasip_core ------------------+   |
            |  |  IF: pc ──> prog_rom (sync) ──> ID: decode, regfile,      |   |
 adc1/2 --->|  |                                     io_regs, bypass       |   |
 commi  --->|  |                                        │                  |   |
 commo  <---|  |  EX: alu | mul_unit | cordic_atan | lw/sw | otprd/otpwr  |   |
 txcnf  <---|  |        branch/jump/return/sleep, write-back ──┐           |   |
 ana1-3 <---|  |  irq_ctrl: pending, mask, priority             └─> bypass |   |
 sleep_o <--|  +-----------------------------------------------------------+   |
            |     prog_rom 512x32      data_ram 128x16      otp_macro 128 bit |
            +-------------------------------------------------------------------+
```

## Register space

Register operands share one 6-bit space:

| index | name | access | use |
|---|---|---|---|
| 0 | `$0` | read 0 | constant zero, writes ignored |
| 1..31 | `$1`..`$31` | r/w | general purpose, 16 bit |
| 32 | `adc1` | r | receiver phase-shift counter 1 |
| 33 | `adc2` | r | receiver phase-shift counter 2 |
| 34, 35 | `commi1`, `commi2` | r | received 20-bit packet, bits 15:0 and 19:16 |
| 36, 37 | `commo1`, `commo2` | r/w | packet to send; writing `commo2` sends it (`commo_send_o` pulse) |
| 38 | `txcnf` | r/w | transmitter configuration |
| 39..41 | `ana1`..`ana3` | r/w | analog interface controls |
| 42 | `otprg` | r/w | OTP special functions: bit 0 = programming enabled |
| 43 | `irqen` | r/w | interrupt enable mask, bit n for line n, reset 0 |

R-type instructions use 6-bit fields, so they can read and write I/O registers
directly (`add $4, $adc1, $0` copies a counter value). I-type instructions have
5-bit fields and reach only `$0`..`$31`.

## Instruction set and encoding

All instructions are 32 bits, one per ROM word.

```
R-type  [31:26] op  [25:20] rd  [19:14] rs  [13:8] rt  [7:5] 0  [4:0] sh
I-type  [31:26] op  [25:21] ra  [20:16] rb  [15:0] imm
J-type  [31:26] op  [25:16] 0               [15:0] target
```

| op | mnemonic | meaning | EX cycles |
|---|---|---|---|
| 0 | `nop` | | 1 |
| 1 | `add rd, rs, rt` | signed, saturates to [-32768, 32767] | 1 |
| 2 | `addu rd, rs, rt` | wraps modulo 2^16 | 1 |
| 3 | `sub rd, rs, rt` | signed, saturates | 1 |
| 4 | `subu rd, rs, rt` | wraps | 1 |
| 5-7 | `and/or/xor rd, rs, rt` | bitwise | 1 |
| 8-10 | `sll/srl/sra rd, rs, sh` | shift by the `sh` field | 1 |
| 11 | `mul rd, rs, rt, sh` | `sat16((rs*rt) >>> sh)`, full 32-bit product first | 2 |
| 12 | `atan rd, rs, rt` | angle of the vector (x=rt, y=rs), 65536 = full turn | 7 |
| 16 | `addi ra, rb, imm` | `ra = rb + imm` (wraps) | 1 |
| 17, 18 | `andi/ori ra, rb, imm` | | 1 |
| 19 | `lw ra, imm(rb)` | `ra = RAM[rb+imm]` | 2 |
| 20 | `sw ra, imm(rb)` | `RAM[rb+imm] = ra` | 1 |
| 21 | `otprd ra, imm(rb)` | `ra = OTP[rb+imm]` | until OTP ack (3 with the model) |
| 22 | `otpwr ra, imm(rb)` | program OTP word (sets bits only); no-op unless `otprg[0]` | until ack (9) / 1 |
| 24 | `beq ra, rb, imm` | if equal, go to pc+1+imm | 1 (+2 if taken) |
| 25 | `bne ra, rb, imm` | if not equal | 1 (+2) |
| 26 | `bgt ra, rb, imm` | if ra > rb, signed | 1 (+2) |
| 27 | `j target` | absolute jump | 1 (+2) |
| 28 | `return` | return from interrupt handler | 1 (+2) |
| 29 | `sleep` | wait for an interrupt | see below |

Undefined opcodes execute as `nop`. `sensasip_pkg` provides `enc_r`, `enc_i`
and `enc_j` to assemble programs from SystemVerilog. The end-to-end testbench
uses them to build its firmware.

## The pipeline

This is the part to understand before changing the core (`sensasip_core.sv`).

**Stages.**
- IF: `pc` addresses the synchronous program ROM. The ROM's output register is
  the instruction word held for decode.
- ID: decodes the instruction and reads both operands from the register file or
  the I/O registers.
- EX: executes, resolves branches, accesses RAM or OTP, and writes the result
  back at the end of its last cycle.

**No data stalls.** A result is written at the end of EX. In that same cycle,
decode may be reading the same register for the next instruction. A bypass
multiplexer in ID passes the value being written straight to the operand. So a
dependent instruction can follow directly, even after `lw`, `mul` or `atan`.
There is nothing to reorder in the firmware.

**Multi-cycle instructions.** `mul`, `atan`, `lw`, `otprd` and `otpwr` stay in
EX until their unit reports completion:
- `mul` takes 2 cycles, `atan` 7, `lw` 2 (synchronous RAM).
- `otprd`/`otpwr` wait for the OTP acknowledge.

While EX is busy, the ROM enable is dropped and `pc` and the decode register
hold. The instruction behind therefore waits in ID and re-reads its operands
every cycle. It picks up the multi-cycle result through the bypass in the
completion cycle. The units start on the first EX cycle, marked by `ex_first_q`.
An assertion checks that a stalled EX instruction never changes.

**Control transfer.** These are resolved in EX:
- taken branches, `j`, `return`;
- `sleep`, which is treated as a jump to the next instruction.

The instruction in ID and the word being fetched are discarded, so a taken
transfer costs two bubbles.

**Interrupts.** A pending, enabled interrupt line n is taken when all of these
hold:
- the core is not already in a handler;
- EX is not redirecting;
- either a valid instruction sits in ID and EX is not stalled, or the core is
  asleep.

When it is taken:
- The instruction in ID is cancelled, and its address is saved as the return
  address.
- Fetch restarts at ROM address n + 1, where the firmware keeps a jump to its
  handler. Address 0 is the reset entry.
- Handlers do not nest. A request that arrives during a handler stays pending
  and is taken after `return`.
- Several pending requests are served lowest line first, one after another.

**Sleep.** After `sleep` the core fetches nothing and every pipeline register
holds. `sleep_o` is high, which is the hook for a clock gate. An enabled
interrupt wakes the core straight into its handler. `return` then resumes after
the `sleep` instruction, so the usual idle loop is `main: sleep; j main`.

**Firmware skeleton**, the layout the end-to-end test uses:

```
0:  j init        ; reset
1:  j hadc        ; line 0: receiver data ready
2:  j hcomm       ; line 1: packet received
3:  return        ; lines 2, 3 unused
4:  return
init: ...program / read OTP parameters, write irqen...
main: sleep
      j main
hadc: add $4, $adc1, $0 ... mul ... bgt ... atan ... add $commo2, $0, $0 ; send
      return
```

## Arithmetic units

**`mul_unit`** is a sign-magnitude array multiplier in two register stages.
- Stage 1 detects the operand signs and takes the magnitudes. It sums the
  partial-product matrix in two halves and registers both halves.
- Stage 2 adds the halves and restores the sign. It then shifts right
  arithmetically by `sh` and saturates to 16 bits.

A Q-format scaling `y = x * k / 2^s` is therefore one instruction.

**`cordic_atan`** runs CORDIC in vectoring mode, with 14 iterations done two per
clock.
- A vector in the left half plane is first turned by 180 degrees.
- The elementary angles are `round(atan(2^-i) / (2*pi) * 65536)` for i = 0..13.
- The x/y datapath has 3 extra integer bits for the CORDIC gain and 5 guard
  bits.
- Accuracy is within 4 LSB of the ideal binary angle for vectors of useful
  length. Short vectors (|x|+|y| below a few thousand) lose about 16384/(|x|+|y|)
  LSB to integer quantisation.
- Only the angle is produced. The vector length is not.

## Memories

- `prog_rom`: DEPTH x 32 with a synchronous read and an enable. The default is
  512 words, as in the inductive sensor build. Load it from a hex file through
  `ROM_INIT_FILE`, or write `u_rom.mem` from a testbench before releasing reset.
- `data_ram`: 128 x 16, single port, synchronous. A read of an address being
  written returns the old value.
- `otp_macro`: a behavioural model of the 128-bit OTP, organised as 8 words of
  16 bits.
  - Reads acknowledge after 2 clocks, programming after 8.
  - Programming can only set bits.
  - Contents survive reset.

  Replace it with the foundry macro and adapt the request/acknowledge wrapper.

## Configurations

| | inductive position sensor | 3D Hall sensor | top defaults |
|---|---|---|---|
| program ROM | 512 x 32 | 1024 x 32 | `ROM_WORDS=512` |
| data RAM | none (`HAS_RAM=0`) | 128 x 16 | `HAS_RAM=1`, `RAM_WORDS=128` |
| multiplier | yes | yes | `HAS_MUL=1` |
| atan unit | no (`HAS_ATAN=0`) | yes | `HAS_ATAN=1` |
| parameter memory | 128-bit OTP | E2PROM | 128-bit OTP model |

The defaults combine both builds so that every unit is present. The extended
ALU is modular:
- Without the multiplier, `mul` completes in one cycle and writes 0.
- Without the CORDIC unit, `atan` does the same.
- Without the RAM, `lw` reads 0.

The reference inductive firmware of about 300 instructions fits the 512-word
ROM. Its worst-case handler of 156 cycles takes 19.5 us at 8 MHz, well inside
the 65 us measurement period. The 3D Hall firmware of about 750 instructions
needs `ROM_WORDS=1024`.

## What is specified and what is chosen here

Taken from the description of the processor:
- three pipeline stages, hazard detection, multi-cycle instructions;
- a 16-bit two's complement datapath and 31 general-purpose registers;
- a 512 x 32 program ROM, a 128 x 16 RAM and a 128-bit OTP;
- `mul` in two cycles through a two-stage sign-detecting array multiplier;
- `atan` as a seven-cycle CORDIC instruction;
- `beq`/`bne`/`bgt`, `otprd`/`otpwr`, `sleep`, `return`;
- interrupt-driven firmware that sleeps in its main loop;
- the I/O register names, including the 20-bit packet split over two registers;
- the jump table at the start of the program.

Choices made here:
- The whole binary encoding and the I/O register numbering.
- Saturation in signed `add`/`sub` and `mul`.
- The post-shift of `mul`.
- Bitwise instructions, `addi`/`andi`/`ori`.
- The stage boundaries, the write-back bypass and the 2-cycle branch penalty.
- Branches relative to pc+1.
- Interrupt priority, the `irqen` mask, no nesting, and entry in place of the
  decode instruction.
- The `otprg` bit-0 programming lock.
- The OTP timing and all memory handshakes.

One deliberate difference: the reference design builds the CORDIC from adders
shared with the ALU. Here the CORDIC unit has its own adders, so the single-cycle
ALU stays independent of it.

Not included, because they are not described in enough detail:
- the transmitter, the receiver counter, the packet interface and the test block
  (they connect through the top-level ports);
- the 3D Hall analog front end and E2PROM;
- the scan chain, which is inserted by synthesis.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.
- `tb_regfile`, `tb_alu`, `tb_mul_unit`, `tb_cordic_atan`: random and corner
  operands against reference arithmetic. The multiplier's 2-cycle latency and the
  CORDIC's 7-cycle latency are checked.
- `tb_io_regs`, `tb_irq_ctrl`, `tb_prog_rom`, `tb_data_ram`, `tb_otp_macro`:
  cycle models.
- `tb_sensasip_top` runs the full macrocell at its default sizes with the
  firmware above.
  - It checks 60 conditioning results against a reference model, including
    clamping at both limits.
  - It checks the RAM round trip, the `atan` result, the packet echo and two
    simultaneous interrupts.
  - It checks that `mul` spends 2 cycles and `atan` 7 cycles in EX.
  - It counts each pipeline mechanism and fails if any never happened: bypass,
    every stall type, branch squash, interrupt entry, wake from sleep and both
    clamps.

Two firmware workloads run on the complete macrocell:
- `tb_otp_crc` uses the inductive build. A 23-instruction routine checks the
  OTP parameters with a CRC-16: polynomial 0x1021, initial value 0xFFFF, MSB
  first, one 16-bit word at a time. The routine uses only shifts, xor and
  `bne`/`bgt`/`beq`. It takes about 1070 cycles, and the test flags an OTP image
  with one blown bit as corrupted.
- `tb_hall_workload` uses the 1024-word ROM. At start-up the parameters are
  copied from the non-volatile memory into RAM. Each measurement then runs:
  - offset correction (`sub`);
  - sensitivity scaling (`mul`);
  - the field angle (`atan`);
  - linearisation (`subu`, `mul`) and clamping;
  - a store into a 32-entry RAM history ring.

  Its handler sends the result 43 cycles after the interrupt.

The conditioning handler of `tb_sensasip_top` sends its packet 35 cycles after
the interrupt.

Simulate any testbench with Verilator 5, from the directory above `rtl/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/sensasip_pkg.sv \
    tb/tb_sensasip_top.sv --top-module tb_sensasip_top -o sim
./obj_dir/sim
```

Every register is reset, and the memories are initialised to zero. Results
therefore do not depend on a simulator's initial values, including two-state
simulators. Testbenches load firmware by writing `dut.u_rom.mem` before
releasing reset, and OTP images by writing `dut.u_otp.cells`.

## Files

- `rtl/sensasip_pkg.sv`: types, opcodes, I/O register numbers, encoders
- `rtl/sensasip_top.sv`: macrocell top
- `rtl/sensasip_core.sv`: pipeline, hazard logic, interrupts, sleep
- `rtl/regfile.sv`, `rtl/alu.sv`, `rtl/mul_unit.sv`, `rtl/cordic_atan.sv`,
  `rtl/io_regs.sv`, `rtl/irq_ctrl.sv`: core sub-blocks
- `rtl/prog_rom.sv`, `rtl/data_ram.sv`: memories as arrays
- `rtl/otp_macro.sv`: OTP behavioural model
- `tb/tb_*.sv`: testbenches
