# MIC-1 / MAC-1: a microprogrammed CPU

This design builds a CPU whose instruction set is not implemented directly
in logic. A small, simple processor, the **MIC-1 microengine**, runs a
program held in an on-chip ROM, the **control store**. That program, the
**microcode**, interprets the instructions of the target machine, **MAC-1**. In effect
the microcode is an emulator for MAC-1 that lives inside the chip. Replace the
control-store contents and the same hardware becomes a different CPU.

MAC-1 is a 16-bit accumulator machine with a 12-bit (4096-word) address space.
The MIC-1 executes one 32-bit microinstruction every four clock periods.
A MAC-1 instruction costs 7 to 14 microinstructions, including its own
fetch and decode.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. The top level is
`mac1_system`, which is the MIC-1 chip (`mic1_cpu`) plus the MAC-1 main memory
(`mac1_memory`).

## The target machine: MAC-1

Programmer-visible state: `pc` (12 bits), `ac` (16 bits), `sp` (12 bits).
All instructions are one 16-bit word. `x` is a 12-bit field, `y` an 8-bit
field, and `m[]` is memory.

| encoding | name | effect | microinstructions |
|---|---|---|---|
| `0000 x` | LODD | ac := m[x] | 9 |
| `0001 x` | STOD | m[x] := ac | 8 |
| `0010 x` | ADDD | ac := ac + m[x] | 9 |
| `0011 x` | SUBD | ac := ac - m[x] | 10 |
| `0100 x` | JPOS | if ac >= 0: pc := x | 8 taken / 7 not |
| `0101 x` | JZER | if ac = 0: pc := x | 8 |
| `0110 x` | JUMP | pc := x | 7 |
| `0111 x` | LOCO | ac := x (zero-extended) | 7 |
| `1000 x` | LODL | ac := m[sp+x] | 10 |
| `1001 x` | STOL | m[sp+x] := ac | 9 |
| `1010 x` | ADDL | ac := ac + m[sp+x] | 10 |
| `1011 x` | SUBL | ac := ac - m[sp+x] | 11 |
| `1100 x` | JNEG | if ac < 0: pc := x | 8 |
| `1101 x` | JNZE | if ac != 0: pc := x | 8 taken / 7 not |
| `1110 x` | CALL | sp := sp-1; m[sp] := pc; pc := x | 9 |
| `1111 0000 ...` | PSHI | sp := sp-1; m[sp] := m[ac] | 13 |
| `1111 0010 ...` | POPI | m[ac] := m[sp]; sp := sp+1 | 13 |
| `1111 0100 ...` | PUSH | sp := sp-1; m[sp] := ac | 12 |
| `1111 0110 ...` | POP | ac := m[sp]; sp := sp+1 | 12 |
| `1111 1000 ...` | RETN | pc := m[sp]; sp := sp+1 | 12 |
| `1111 1010 ...` | SWAP | exchange ac and sp | 12 |
| `1111 1100 y` | INSP | sp := sp + y | 11 |
| `1111 1110 y` | DESP | sp := sp - y | 14 |
| `1111 1111 ...` | HALT | stop (see below) | 10 until halted |

A MAC-1 instruction takes 4 clock periods per microinstruction. Arithmetic
wraps at 16 bits; `sp`, `pc` and every address wrap at 12 bits. The
"local" modes add `sp` to `x` modulo 4096. After reset, execution starts
at address 0 with `ac = sp = 0`, so the first push lands at 0xFFF.

The 1111 group decodes only bits 11-9, plus bit 8 for the last pair. The
other bits are ignored, so for example 0xF1xx behaves as POPI and 0xF5xx
as POP. HALT has no routine of its own in the classic microprogram. Here the
decode tree sends it to control-store word 80, which branches to itself,
so `mpc` stays at 80 until reset.

## The microengine: MIC-1

```
           +--------------------- control store (256 x 32 ROM) <-- mpc <--+
           |                                                             |
           v                                                       mmux (cond, n, z)
          mir ---- a,b,c fields --> decoders --> register file (16 x 16)  |   ^
           |                                     |a bus     |b bus      | incrementer
           |                                  A latch     B latch ---> mar --> address pins
           |                                     |          |
           |                  mbr ----------> amux          |
           |                   ^                 \         /
           |                   |                    ALU ----> n, z flip-flops
           |                   |                     |
           |                   +------------------ shifter = c bus --> register file
           +-- amux/alu/sh/mbr/mar/rd/wr/enc control bits
```

**Registers.** There are sixteen 16-bit registers, named for their MAC-1
use. They can hold anything a different microprogram wants.

| # | name | | # | name | |
|---|---|---|---|---|---|
| 0 | pc | 12 bits | 8 | amask | constant 0x0FFF |
| 1 | ac | | 9 | smask | constant 0x00FF |
| 2 | sp | 12 bits | 10-15 | a-f | scratch |
| 3 | ir | | | | |
| 4 | tir | | | | |
| 5 | 0 | constant 0x0000 | | | |
| 6 | +1 | constant 0x0001 | | | |
| 7 | -1 | constant 0xFFFF | | | |

The constant registers ignore writes. `pc` and `sp` store 12 bits and read
back zero-extended.

**Buses.** The a and b buses carry two registers to the ALU. The c bus
carries the shifter output back to a register and to `mbr`. `mar` can load
only from the B latch (its low 12 bits). `mbr` reaches the ALU only through
the amux.

**ALU and shifter.** The ALU computes a+b, a AND b, a, or NOT a. `n`
(bit 15) and `z` (all zeros) are taken from the ALU result, before the
shifter. The shifter passes the word unchanged or shifts it one bit left or
right, filling with 0.

### The four subcycles

`mic1_subcycle_gen` is a one-hot ring that asserts subcycle 1, 2, 3, 4 in
turn, one clock period each. Every register is clocked by the same clock and
uses a subcycle line as its enable, so it loads at the clock edge that ends
that subcycle:

| edge ending | what loads |
|---|---|
| subcycle 1 | `mir` from the control store word at `mpc` |
| subcycle 2 | A and B latches from the registers named by the a and b fields |
| subcycle 3 | `n` and `z` from the settled ALU output |
| subcycle 4 | register `c` (if enc), `mbr` (if mbr, or read data when a read completes), `mar` (if mar), `mpc` (from the mmux); memory acts |

Two features of this ordering matter.

- The bus latches let one microinstruction read and write the same register.
  For example, `ac := ac + a` works because the ALU sees the copy latched in
  subcycle 2, not the value written in subcycle 4.
- `n` and `z` are recorded in subcycle 3 and tested in subcycle 4 of the
  **same** microinstruction. The decode microcode relies on this: in
  `ir := mbr; if n then goto ...` the branch tests bit 15 of the word being
  copied.

The c decoder is gated by `enc` AND subcycle 4. No register can be written
before the shifter output is valid.

### Microinstruction format (32 bits)

| bits | field | meaning |
|---|---|---|
| 31 | amux | ALU left input: 0 = A latch, 1 = mbr |
| 30-29 | cond | branch: 00 never, 01 if n, 10 if z, 11 always |
| 28-27 | alu | 00 a+b, 01 a AND b, 10 a, 11 NOT a |
| 26-25 | sh | 00 none, 01 right 1, 10 left 1, 11 unused (passes) |
| 24 | mbr | load mbr from the shifter |
| 23 | mar | load mar from the B latch |
| 22 | rd | memory read request |
| 21 | wr | memory write request |
| 20 | enc | write the c bus into register c |
| 19-16 | c | destination register |
| 15-12 | b | b bus source |
| 11-8 | a | a bus source |
| 7-0 | addr | branch target |

Example: `mar:=sp; mbr:=ac; wr; goto 10` encodes as `0x71A0210A`. The
package `mic1_pkg` defines this layout as the packed struct `microinstr_t`,
with enums for cond, alu and sh.

## The microprogram

`mic1_control_store` holds 81 microinstructions. A constructor function
builds each one field by field. Words 81 to 255 branch to 0.

- **Fetch (words 0-2).** `mar := pc; rd`, then `pc := pc + 1; rd`, then
  `ir := mbr`, with a branch on bit 15.
- **Decode (a binary tree).** `tir` receives `ir` shifted left. The test
  of bit 14 uses a double shift, `tir := lshift(ir + ir)`: the add moves bit 14 into the sign
  position for `n`, and the shifter moves it one place further for the next
  test. Each later step is `tir := lshift(tir); if n ...` or a final
  `alu := tir; if n ...`. After at most seven tests one of the 24 routines is
  reached.
- **Routines.** Each routine ends with `goto 0`. Routines share tails: the
  local-mode loads jump into the second half of their direct-mode
  counterparts, and every write finishes in the common word 10 (`wr; goto 0`).
  SUBD/SUBL compute `ac + 1 + NOT m`. DESP negates `y` the same way and then
  shares INSP's final add.

In the microcode, one microinstruction sometimes both loads `mar` from
`sp` and increments `sp` (`mar := sp; sp := sp + 1; rd`). `sp` is then
placed on the b bus, since `mar` can load only from b, and the constant
+1 on the a bus.

## System bus and memory timing

`mic1_cpu` drives the following signals:

- `mem_addr` = `mar`
- `mem_wdata` = `mbr`
- `mem_rd` and `mem_wr` = the current microinstruction's rd and wr bits
- `mem_strobe` = subcycle 4

It receives `mem_rdata` and `mem_ready`.

A memory access takes two consecutive microinstructions asserting the same
request:

- The first microinstruction starts the access.
- At the end of the second one, a write stores `mbr` at `mar`, or a read
  completes and `mbr` takes the data (`ready` is high for that strobe).
- A third consecutive request starts a new access.
- A read followed by a write completes nothing.

`mar` must hold the address through the second microinstruction. The
microcode loads it in the first one.

`mac1_system` brings the bus out (`bus_addr`, `bus_wdata`, `bus_rd`,
`bus_wr`, `bus_strobe`) so that memory-mapped I/O can be attached. No I/O
device is part of this design, and the memory answers every address.

## Files

| file | contents |
|---|---|
| `rtl/mic1_pkg.sv` | widths, microinstruction struct, enums, register numbers and constants |
| `rtl/mac1_system.sv` | top: MIC-1 chip + main memory (`MEM_WORDS` = 4096) |
| `rtl/mic1_cpu.sv` | the MIC-1 chip; wires the blocks below |
| `rtl/mic1_subcycle_gen.sv` | four-phase ring |
| `rtl/mic1_control_store.sv` | microprogram ROM (`DEPTH` = 256) |
| `rtl/mic1_mpc.sv`, `rtl/mic1_incrementer.sv`, `rtl/mic1_mmux.sv` | micro-sequencer |
| `rtl/mic1_mir.sv` | microinstruction register |
| `rtl/mic1_decoder.sv` | 4-to-16 decoder with enable (used for a, b, c) |
| `rtl/mic1_regfile.sv` | 16 registers with constants and 12-bit pc/sp |
| `rtl/mic1_bus_latches.sv` | A and B latches |
| `rtl/mic1_amux.sv`, `rtl/mic1_alu.sv`, `rtl/mic1_nz_flags.sv`, `rtl/mic1_shifter.sv` | datapath |
| `rtl/mic1_mar.sv`, `rtl/mic1_mbr.sv` | memory interface registers |
| `rtl/mac1_memory.sv` | 4096 x 16 main memory with the two-microinstruction protocol |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
A watchdog bounds each run. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mic1_pkg.sv \
          tb/tb_mac1_system.sv --top-module tb_mac1_system -o sim
./obj_dir/sim
```

Swap the testbench name for any other `tb/tb_*.sv`. All testbenches run in
seconds.

To load a MAC-1 program, write words into `u_mem.mem[]` of `mac1_system`
before releasing reset, as `tb_mac1_system` does. A halt shows as `mpc == 80`.

## How it is verified

- **`tb_mac1_system`** runs the full-size system and is the main test.
  - Inside it, a MAC-1 instruction-set model, written from the instruction
    table, runs in lock step with the design. Each time `mpc` returns to 0,
    the model executes one instruction. The testbench then compares `pc`,
    `ac`, `sp` and the clock count (4 x the microinstruction count in the
    table above).
  - When the run ends, it compares all 4096 memory words.
  - First comes a directed program that uses every instruction, takes and
    skips each conditional jump, wraps `sp`, and halts.
  - Then 8 images of random memory run 2000 instructions each, which
    exercises unusual encodings and self-modifying code.
  - The run fails if any instruction, either outcome of a conditional jump,
    a memory read, a write or an `sp` wrap never occurs.
- **`tb_mic1_cpu`** runs the chip against a memory written independently
  inside the testbench. It checks results, total clock count, and that
  every request is held for exactly two microinstructions.
- **The remaining testbenches** check one block each:
  - exhaustive or random comparisons against expected values;
  - hand-assembled control-store words, including the reference encoding
    above;
  - invariants over the whole ROM.
- **Assertions** in the RTL check that the subcycle ring stays one-hot,
  that no microinstruction both reads into and loads `mbr`, and that the
  memory never sees rd and wr together.

## Design choices and departures from the classic MIC-1 description

- **Clocking.** The subcycle generator is a synchronous ring counter, not a
  chain of delay elements. Latches and tri-state bus drivers are replaced by
  edge-triggered registers with enables and by multiplexers. The behaviour
  at microinstruction granularity is unchanged.
- **Load timing.** `mar` and `mpc` load at the end of subcycle 4 together
  with the other registers. `n`/`z` load at the end of subcycle 3.
- **Memory.** The memory's start/complete bookkeeping and its combinational
  read port are this design's own. The data pins are split into separate
  input and output buses.
- **HALT** (`0xFFxx`) parks the microengine at word 80. The classic listing
  branches to a HALT label that it never defines.
- **Reset.** Reset clears `mpc`, `mir`, the latches, `n`/`z`, `mar`, `mbr`
  and the writable registers. It does not clear memory.
- **Unused field codes.** The unused shifter code 11 passes data unchanged,
  and unused control-store words branch to 0.
- **Not built.** There are no memory-mapped I/O devices: the design only
  says that I/O is memory-mapped. The wider "horizontal" variant, with a
  16-bit one-hot c field that writes several registers at once, is
  discussed as an alternative and is not built.
