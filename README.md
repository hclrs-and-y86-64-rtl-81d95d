# Single-cycle Y86-64 CPUs, built up one instruction at a time

This is a family of small single-cycle processors for the Y86-64 teaching
instruction set. Each one adds a little to the one before. Each CPU runs one
instruction per clock cycle. In that cycle the PC selects ten bytes of
memory, combinational logic decodes them and computes every result, and the
rising clock edge commits the new PC, register and memory values together.

| CPU | instructions | new idea |
|-----|--------------|----------|
| `nop_cpu` | every byte treated as `nop` | a PC register feeding an adder and the instruction memory |
| `nophalt_cpu` | `nop`, `halt` | a MUX on the opcode produces the status (Stat), and a non-AOK Stat stops the CPU |
| `nopjmp_cpu` | `nop`, `jmp`, `halt` | a MUX chooses the next PC: PC+1 or the jump target |
| `addq_cpu` | `addq rA, rB` | register file and ALU: read two registers, write the sum back |
| `mov_cpu` | `rrmovq`, `irmovq`, `mrmovq`, `rmmovq`, `halt` | data-memory reads and writes, an address adder, and a write-back MUX |
| `seq_cpu` | the whole Y86-64 set | the SEQ organisation: computed source and destination registers, ALU input MUXes, condition codes, the stack |

All six use the same building blocks (`rtl/`), and `y86_lecture_top`
places them side by side.

## Instruction bytes and `i10bytes`

The instruction memory port returns the ten bytes at PC..PC+9 as one
80-bit value, `i10bytes`. The byte at PC is in bits 7:0, so the value reads
little-endian. For example, memory `60 12 61 21 00 00 00 00 00 00 01 ...`
fetched at PC 0 gives `0x00000000000021611260`. At PC 1 it gives
`0x01000000000000216112`.

A Y86-64 instruction is 1, 2, 9 or 10 bytes long:

| byte | 0 | 1 | 2..9 |
|------|---|---|------|
| bits of `i10bytes` | 7:4 icode, 3:0 ifun | 15:12 rA, 11:8 rB | 79:16 V or D |

`jmp` and `call` put their 8-byte target right after the opcode byte, at
bits 71:8 (`dest`). Register number 15 (`F`, REG_NONE) means "no
register": it always reads as 0, and writes to it are dropped. `irmovq`
uses it in the rA field. The opcodes are: halt 0, nop 1, rrmovq 2,
irmovq 3, rmmovq 4, mrmovq 5, OPq 6, jXX 7, call 8, ret 9, pushq A, popq B.

`fetch_split` holds all of these bit positions. It also looks up the
instruction length from icode and returns `valP = PC + length`.

## Building blocks

- **`reg_bank`**: a clocked register with a reset value. It loads `d` on
  the rising edge unless `stall` is high. The PC is a 64-bit `reg_bank`
  that resets to 0.
- **`y86_mem`**: one byte array with two views. The instruction port gives
  `i10bytes` at `pc`. The data port reads 8 bytes at `daddr` and, when `dwe`
  is high, writes 8 bytes there at the clock edge, both little-endian. Both
  ports see the same array, so a store changes the code a later fetch
  returns, as in real Y86-64. Reads are combinational: the output follows
  the address after a delay. The module also has a byte-wide loader port
  (`load_*`), which stands in for loading a program image, and an 8-byte
  observation port (`dbg_*`). Addresses at or above `MEM_BYTES` (default
  1024) read as 0, and writes to them are dropped.
- **`regfile`**: 15 registers of 64 bits (rax, rcx, rdx, rbx, rsp, rbp,
  rsi, rdi, r8 to r14). It has two combinational read ports (srcA, srcB)
  and two write ports (dstE/valE and dstM/valM) that write at the clock
  edge. Register 15 reads as 0 and ignores writes. If both write ports name
  the same register, M wins. Reset clears every register.
- **`alu`**: add, sub, and, xor. Sub computes `b - a`, so `subq rA, rB`
  gives rB - rA. It produces no condition codes; `seq_cpu` derives them
  from the ALU's inputs and result.
- **`mux4`**: a 4:1 MUX with the truth table 00→a, 01→b, 10→c, 11→d.
- **`stat_unit`**: the Stat register, covered in the next section.
- **`y86_pkg`**: opcode, Stat and ALU-operation enums, plus REG_NONE.

## Stopping: the Stat register

Each CPU with a `halt` computes a Stat for every cycle:

- AOK (1) for an instruction it executes
- HLT (2) for `halt`
- ADR (3), in `seq_cpu` only, for a PC or data access outside memory
- INS (4) for anything else

`stat_unit` turns this into a single `commit` signal, which enables the PC,
register and memory writes. In the first cycle whose Stat is not AOK,
`commit` is low, so nothing changes. From the next edge on, `halted` is
high and the CPU stays frozen until reset. `final_stat` keeps the Stat that
stopped it. `cycles` counts every cycle run, including the stopping cycle.
So the nop/jmp example below reports 7 cycles and stays at the halt
instruction (PC 0x1e).

## The six CPUs

**`nop_cpu`**: `PC ← PC + 1` every cycle, and Stat is always AOK. The
fetched bytes are brought out as a port but not used. After 9999 cycles the
PC is 0x270f.

**`nophalt_cpu`**: as above, plus the Stat MUX (nop → AOK, halt → HLT,
else INS) and the stop logic.

**`nopjmp_cpu`**: the next-PC MUX picks PC+1 for nop and `dest` for jmp.
For anything else it picks the marker value 0xBADBADBAD, which is never
loaded because that instruction stops the CPU. The condition field of
opcode 7 is ignored: every `jXX` jumps. Running this program:

```
0x000: 10                     nop
0x001: 70 13 00 00 00 00 00 00 00   jmp 0x13
0x00a: 70 1c 00 00 00 00 00 00 00   jmp 0x1c
0x013: 70 0a 00 00 00 00 00 00 00   jmp 0x0a
0x01c: 10 / 0x01d: 10 / 0x01e: 00   nop, nop, halt
```

visits PC 0, 1, 13, a, 1c, 1d, 1e. It stops after 7 cycles with HLT.

**`addq_cpu`**: each cycle it reads rA and rB, adds them, and writes the sum
to rB; PC ← PC + 2. The opcode is not checked and Stat is always AOK, so it
runs until reset. An init port (`init_en/init_reg/init_val`) presets
registers through write port M while the PC is held. Example: starting with
rax = 10, rbx = 20 and rdx = 30, `addq %rax,%rdx; addq %rbx,%rdx` gives
PC 2 and rdx 40 after one cycle, then PC 4 and rdx 60.

**`mov_cpu`**: the richest design. Its decode logic drives these control
signals from icode:

| icode | srcA | srcB | ALU (valC + valB) | memory | write-back value (mux4 sel) | dstE | next PC |
|-------|------|------|-------------------|--------|-----------------------------|------|---------|
| rrmovq 2 | rA | F | unused | — | valA (0) | rB | PC+2 |
| irmovq 3 | F | F | unused | — | valC (1) | rB | PC+10 |
| mrmovq 5 | F | rB | D + rB = address | read valM | valM (2) | rA | PC+10 |
| rmmovq 4 | rA | rB | D + rB = address | write valA | — (3) | F | PC+10 |
| halt 0 | — | — | — | — | — | F | held, Stat HLT |
| other | — | — | — | — | — | F | held, Stat INS |

All register writes go through write port E, and `mux4` chooses the value.
Port M is left at register 15. The memory write enable is high only for a
committed `rmmovq`. `nop` is not decoded, because the next-PC choice in
this CPU is only +2 or +10. With `HAS_RMMOVQ = 0`, the module becomes the
smaller mov-to-register CPU, and `rmmovq` counts as an invalid instruction.
Two assertions check that a stopped CPU's PC never moves and that only a
valid `rmmovq` writes memory.

**`seq_cpu`**: every Y86-64 instruction in one cycle, organised as the
six SEQ stages:

1. Fetch: `fetch_split`, which gives `valP`.
2. Decode: the register file reads srcA and srcB.
3. Execute: the ALU computes `valE`, OPq sets the condition codes, and
   `Cnd` is evaluated.
4. Memory: the data memory is read (`valM`) or written.
5. Write back: `valE` goes to dstE and `valM` to dstM.
6. PC update.

| icode | srcA | srcB | aluA | aluB | memory address / data | dstE | dstM | next PC |
|-------|------|------|------|------|-----------------------|------|------|---------|
| halt, nop | F | F | — | — | — | F | F | valP (halt stops) |
| rrmovq/cmovXX | rA | F | valA | 0 | — | rB if Cnd | F | valP |
| irmovq | F | F | valC | 0 | — | rB | F | valP |
| rmmovq | rA | rB | valC | valB | valE ← valA | F | F | valP |
| mrmovq | F | rB | valC | valB | read valE | F | rA | valP |
| OPq | rA | rB | valA | valB (op = ifun) | — | rB | F | valP |
| jXX | F | F | — | — | — | F | F | Cnd ? valC : valP |
| call | F | %rsp | −8 | valB | valE ← valP | %rsp | F | valC |
| ret | F | %rsp | +8 | valB | read valB | %rsp | F | valM |
| pushq | rA | %rsp | −8 | valB | valE ← valA | %rsp | F | valP |
| popq | rA | %rsp | +8 | valB | read valB | %rsp | rA | valP |

popq reads rA as srcA, but the value is not used. Its address is the old
%rsp taken from valB. Port M has priority, so `popq %rsp` leaves the
popped value in %rsp, and `pushq %rsp` stores the old %rsp. The conditions
for jXX and cmovXX are ifun 0 always, 1 le, 2 l, 3 e, 4 ne, 5 ge and 6 g.
They use ZF, SF and OF, which OPq sets (and and xor clear OF). The codes
start as Z=1 S=0 O=0. Stat is ADR when the PC, or any of the eight bytes
of a data access, lies outside the memory. Stat is INS for an unknown
icode, or for an OPq, jXX or cmovXX function code out of range.

## Top level

`y86_lecture_top` shares `clk` and `rst` between the six CPUs. It brings
every other CPU port out with a prefix: `nop_`, `nh_` (nop/halt), `nj_`
(nop/jmp), `addq_`, `mov_` and `seq_`. Each CPU has its own `MEM_BYTES` memory. To
run a program:

1. Hold `rst` high.
2. Write the image one byte per clock through `<cpu>_load_*`. Fill unused
   bytes too, because memory is not cleared.
3. Drop `rst`.

Reset is synchronous.

## Choices made where the instruction set description is silent

- The Stat codes HLT = 2, ADR = 3 and INS = 4 are the standard Y86-64
  values. AOK = 1.
- Halting commits nothing in the halt cycle, and the halt cycle counts in
  `cycles`.
- The memory size is 1024 bytes. Out-of-range bytes read 0 and ignore
  writes. Only `seq_cpu` reports an address error (ADR).
- Registers reset to 0. When both register write ports name the same
  register, port M wins.
- `mov_cpu` handles halt and invalid opcodes the same way as the nop/halt
  CPU, and writes registers through a single port.
- In `nopjmp_cpu`, `jXX` ignores its condition.
- The ALU's operation encoding (add 0, sub 1, and 2, xor 3) follows the
  OPq function codes.
- In `seq_cpu`, the condition-code rules, the condition table and the
  settings for the MUXes that the stage outline leaves open are taken from
  the standard Y86-64 instruction definitions.
- The loader, init and observation ports are additions for testing and
  integration.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. To build and run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/y86_pkg.sv \
    tb/tb_mov_cpu.sv --top-module tb_mov_cpu -Mdir obj_mov -o sim
./obj_mov/sim
```

What the testbenches cover:

- `tb_mov_cpu` generates random mov programs. It executes each one on an
  instruction-level model and checks the PC every cycle, the cycle count,
  all registers and the whole data area.
- `tb_addq_cpu` does the same for random addq programs.
- `tb_seq_cpu` checks `seq_cpu` against a Y86-64 interpreter. The
  programs are:
  - a call to a summing loop
  - `pushq %rsp` and `popq %rsp`
  - the overflow flags under every condition
  - ADR and INS stops
  - twenty random programs, using every instruction except call and ret,
    with forward jumps
- `tb_nopjmp_cpu`, `tb_nophalt_cpu` and `tb_nop_cpu` replay the example
  programs above.
- `tb_y86_lecture_top` runs all six CPUs at their default sizes. It
  counts each mechanism and fails if any of them never happens:
  - PC+1, a jump, a halt stop, an invalid-opcode stop
  - addq write-back and each mov
  - a write to register 15
  - a store that overwrites the next instruction with a halt
  - in the SEQ CPU: call, ret, pushq, popq, OPq, taken and not-taken jXX
    and cmov, and an ADR stop

Not covered: call and ret appear only in the directed programs, not in the
random ones. Backward jumps in random code are not generated. The designs
have been checked in simulation only, and no timing closure has been done.
The single-cycle path runs from the PC through the memory, the register
file, the ALU and the memory again, so it is long.
