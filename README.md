# A 4-stage pipelined Nios soft processor

This is synthesizable SystemVerilog for a soft-core processor of the Nios
family: a 32-bit RISC with 16-bit instructions, a two-operand format, an
11-bit prefix register for building wide immediates, conditional *skip*
instructions instead of conditional branches, branches with one delay slot,
and a large windowed register file of which 32 registers are visible at a
time.

The design point is the one found best among the pipeline organisations of
this machine on an FPGA: **four stages (fetch, decode, operand, execute),
the register file in synchronous on-chip memory, and full data
forwarding**. The main difficulty is that on-chip memories on an FPGA have
registered inputs. A register read therefore cannot happen in the same cycle
as the decode that produces its address, and the pipeline is arranged around
that fact.

## The pipeline

| Stage | Holds | Does |
|---|---|---|
| F  fetch   | prefetch PC, FIFO | reads the instruction memory (result one cycle later), buffers instructions |
| D  decode  | IR, decoder output | maps register numbers through the window pointer and presents the physical addresses to the register file |
| O  operand | D/O register, K register | receives the register file outputs directly, forwards newer results, forms immediates; **branches, jumps, skips and PFX commit here** |
| X  execute | O/X register, STATUS | ALU, data memory access, control register update, register file write |

An instruction is requested from memory in its first cycle and retires at the
end of its fifth. With no hazards one instruction completes per cycle.

| Situation | Cost |
|---|---|
| ALU result used by the very next instruction | 0 (forwarded from X to O) |
| Register written in the same cycle as it is read | 0 (write-back bypass register) |
| Load or store | 1 stall cycle (the data memory answers one cycle later) |
| Load result used by the next instruction | 0 beyond the load's own stall |
| Taken branch, jump, BSR, CALL | 2 empty cycles after the delay slot |
| SAVE / RESTORE | 0 (window pointer forwarded to decode) |
| Taken skip | the next instruction occupies its slot but does nothing |

## Reading a synchronous register file one stage early

Three arrangements make the memory-based register file work without stall
cycles:

1. **The decoder is a ROM addressed from the fetch stage.** `instr_decoder`
   is a 64-entry synchronous ROM indexed by the opcode of the instruction
   *leaving* fetch. Its output changes at the same clock edge as the IR, so
   the decoded control word is ready in D. This matters because the register
   numbers depend on the decode: SAVE reads `%sp`, and CALL and BSR write
   `%o7`.
2. **The register file outputs are not pipelined.** `reg_addr_handler`
   computes the physical addresses in D. `gp_regfile`, which is two memories
   written together to give two read ports, returns the data during O. While
   the pipe is stalled, the memories' read enable is held low so that their
   outputs still belong to the instruction in O.
3. **Forwarding covers both hazards the memory creates.**
   `operand_handler` compares the physical source addresses of the
   instruction in O with the value X is writing back in this cycle. It also
   compares them with a one-entry bypass register that holds the last value
   written. The bypass register covers a write and a read of the same
   register at the same clock edge, where the memory returns the old word.
   Physical addresses are compared, so forwarding stays correct across
   window changes.

## Register windows

`r0..r7` are global. `r8..r15` are the outs (`r14` = `%sp`, `r15` = `%o7`,
the return address), `r16..r23` the locals and `r24..r31` the ins. The
register file is a ring of `NWIN = (RF_SIZE-8)/16` windows of 16 registers
above the globals:

    phys(r) = r                                        for r < 8
    phys(r) = 8 + ((CWP*16 + r - 8) mod (NWIN*16))     for r >= 8

SAVE decrements CWP, so the callee's ins are the caller's outs. SAVE also
writes `%sp_new = %sp_old - 4*IMM8`, reading `%sp` in the old window and
writing it in the new one. RESTORE increments CWP. At 512 registers there
are 31 windows, and CWP resets to 30.

The window pointer lives in STATUS and is written when SAVE, RESTORE or
WRCTL commits in X. The instruction right behind such an instruction needs
the new window while it is still in D. The core therefore computes the
window "as D must see it" from the committed CWP, the instruction in X and
the instruction in O, and feeds that value to the address handler. This is
why SAVE and RESTORE cost nothing.

The ring wraps around silently. There is no window overflow or underflow
trap, so software must not nest more than `NWIN-1` SAVEs.

## Control flow: delay slots, skips and the K prefix

* **Branches** (`BR`, `BSR` with an 11-bit halfword offset; `JMP`, `CALL`
  through register A) are unconditional. They are resolved in O with
  forwarded operands. The instruction after a branch, the delay slot, always
  executes. On a taken branch the prefetch unit is flushed and restarted at
  the target. Normally the delay-slot instruction is already in D and simply
  continues. If it has not reached D yet, it is taken from the fetch output
  in the same cycle or, failing that, refetched ahead of the target.
  `BSR`/`CALL` write the address after the delay slot into `%o7`. A taken
  branch in a delay slot is not supported, and an assertion in `nios_core`
  reports it.
* **Skips** (`SKPS cc`, `SKPRZ`, `SKPRNZ`, `SKP0`, `SKP1`) annul the next
  instruction when their condition holds. A skip followed by a branch is the
  machine's conditional branch. The flags a skip tests are taken from the
  instruction in X when that one sets them. If the annulled instruction is a
  `PFX`, the instruction it prefixes is annulled too, so a prefixed
  instruction is skipped as a unit.
* **PFX** loads the 11-bit K register when it leaves O. The next instruction
  that leaves O consumes K. It makes 5-bit immediates 16-bit (`{K, IMM5}`),
  and gives loads and stores a word offset `4*sext(K)`. `MOVHI` loads the
  upper 16 bits, so `PFX; MOVI; PFX; MOVHI` builds any 32-bit constant.

## Instruction set and encoding

The bit-level encoding is this design's own. The architectural behaviour
described above is the machine's; the opcodes and field positions are not,
so binaries built for a commercial Nios toolchain will not run unchanged.
Formats (`op6 = instr[15:10]`):

    RR    op6 | B[9:5]    | A[4:0]      A <- A op B
    Ri5   op6 | IMM5[9:5] | A[4:0]      A <- A op imm
    I8    op6 | --        | IMM8[7:0]   SAVE
    I11   op5[15:11]      | IMM11       BR 10000, BSR 10001, PFX 10011

| Octal opcode | Instruction |
|---|---|
| 00 | NOP |
| 01-13 | ADD SUB CMP AND OR XOR MOV LSL LSR ASR MUL |
| 14-23 | ADDI SUBI CMPI MOVI MOVHI LSLI LSRI ASRI |
| 24-27 | LD A,[B]  ST [B],A  JMP A  CALL A |
| 30-34 | SKPS cc  SKPRZ A  SKPRNZ A  SKP0 A,bit  SKP1 A,bit |
| 35-37, 50 | SAVE imm8  RESTORE  RDCTL A  WRCTL A |

ADD, SUB, CMP and their immediate forms set N V Z C (C is the carry of an
add and the borrow of a subtract). AND, OR and XOR set N and Z. The SKPS
condition codes are listed in `cond_e` in `rtl/nios_pkg.sv`. STATUS is
`{CWP[8:4], N, V, Z, C}`. Memory accesses are 32-bit words only. Unused
opcodes execute as NOP.

## The system around the core

`nios_system` (the top) is the minimal system used to evaluate the core: the
core, a 16 KB instruction memory (8192 x 16) on the instruction master, and a
16 KB data memory (4096 x 32) on the data master. Both are `onchip_memory`
instances with one-cycle reads. A program is written into the instruction
memory through `prog_we/prog_addr/prog_data` while `rst_n` is low. Execution
starts at address 0. The data master's write traffic (`dwr_*`), a `retire`
strobe, one strobe per pipeline event (`ev_*`) and the current window
pointer are brought out for observation.

Parameters: `RF_SIZE` (128, 256 or 512; default 512), `IMEM_BYTES` and
`DMEM_BYTES` (default 16384), and on the core `FIFO_DEPTH` (default 2).

## Files

| File | Content |
|---|---|
| `rtl/nios_pkg.sv` | opcodes, decoded-control struct, enums |
| `rtl/nios_system.sv` | top: core and the two memories |
| `rtl/nios_core.sv` | pipeline registers, stall, annul and redirect control, CWP and flag forwarding |
| `rtl/prefetch_unit.sv` | prefetch PC, instruction master, FIFO |
| `rtl/instr_decoder.sv` | decoder ROM |
| `rtl/reg_addr_handler.sv` | window address mapping |
| `rtl/gp_regfile.sv` | two-bank register file |
| `rtl/operand_handler.sv` | operand selection, forwarding, bypass register |
| `rtl/k_register.sv` | prefix register |
| `rtl/branch_logic.sv` | targets and skip conditions |
| `rtl/alu.sv`, `rtl/control_registers.sv`, `rtl/rf_write_mux.sv` | execute stage |
| `rtl/onchip_memory.sv` | synchronous RAM |
| `tb/nios_tb_pkg.sv` | assembler helpers and an instruction-level reference model |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. The two that cover the whole machine:

* `tb_nios_core` runs a short program and checks the exact retire cycle of
  every instruction. The first instruction retires in cycle 5. It also
  checks the delay slot followed by two empty cycles, one stall per load and
  store, no stall for forwarded results or SAVE/RESTORE, and a skipped
  instruction.
* `tb_nios_system` runs at the default sizes. It runs small versions of the
  classic test programs for this machine (a dependent arithmetic chain,
  load/use pairs, a ten-deep loop nest, array arithmetic), a recursive
  `fib(8)` using register windows, a mixed program (PFX, MOVHI, MUL, shifts,
  bit skips, a skipped PFX pair, RDCTL/WRCTL, CALL/JMP) and 20 random
  instruction streams. It also runs five application programs, each
  checked against a result the testbench computes itself:

  | Program | Size | Instructions | Cycles |
  |---|---|---|---|
  | multiply | 6x6 integer matrices | 5259 | 6348 |
  | qsort | 100 integers, recursive, one window per call | 10689 | 16264 |
  | crc32 | bitwise CRC-32 over 256 bytes | 18331 | 24037 |
  | gol | Game of Life, 10x10 cells, 4 generations | 23093 | 30845 |
  | stringsearch | 6 case-insensitive tokens in 52 characters | 10191 | 14203 |

  Each run is compared store by store with the
  reference model in `nios_tb_pkg`. The number of retired instructions is
  checked. The end cycle must equal `5 + instructions + loads/stores + 2 *
  taken branches`. Each pipeline event must occur at least once.

To run one with plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/nios_pkg.sv tb/nios_tb_pkg.sv $(ls rtl/*.sv | grep -v nios_pkg) \
        tb/tb_nios_system.sv --top-module tb_nios_system -o sim
    ./obj_dir/sim

The package must come first on the command line. The memories are not
reset. Programs in the testbenches initialise every register and data
word they read.

## Limits and departures

* The opcode map, field layout, STATUS layout, condition-code list,
  immediate-widening rules and reset address are this design's choices.
* There are no interrupts, traps, window overflow/underflow exceptions,
  byte or halfword memory accesses, or control registers other than STATUS.
* Shifts and MUL complete in one execute cycle.
* Stores take the extra memory cycle as loads do, following the rule "one
  stall cycle per memory operation".
* Only the chosen organisation is built. The other pipelines this machine
  has been evaluated with are not included: 2, 3 and 5 stages; versions
  without forwarding; a 5-stage version with a memory data register and a
  registered CWP path; and a 32-register file in logic without windows.
  Their stage boundaries are a re-cut of the same blocks, for example an
  extra register between the ALU and the write-back mux for a 5-stage pipe.
* The result of a memory read-during-write is forwarded around rather than
  relied on, so any on-chip RAM with registered outputs will do.
