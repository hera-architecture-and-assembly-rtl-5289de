# HERA: a 16-bit teaching RISC processor in SystemVerilog

HERA (Haverford educational RISC architecture) is a small 16-bit load/store
machine built to teach assembly language and compilation. It has sixteen
numbered registers and a program counter. Register 0 always reads as zero,
so one small instruction set also covers compare, negate, move and clear. A
carry-block flag switches the whole machine between single-precision
arithmetic and multi-word arithmetic. One CAL instruction and one RETURN
instruction build and tear down a stack frame. This repository holds a
complete, synthesizable implementation of the processor: core, register
file, ALU, flag register, branch unit and memories. It also holds
self-checking testbenches built around an instruction-level reference model.

## Programmer's model

| Register | Name | Use |
|---|---|---|
| R0 | zero | always reads 0, writes are dropped |
| R1 to R12 | | general purpose |
| R13 | OFP | old frame pointer |
| R14 | FP | frame pointer |
| R15 | SP | stack pointer |
| PC | | program counter, changed only by control flow |

Data memory holds 2^16 words of 16 bits and is word-addressed. LOAD and STORE
use the address `a + o`, which wraps at 16 bits.

The flag register `f` has five bits:

| bit | flag | set by |
|---|---|---|
| 0 | s (sign) | arithmetic, logic, multiply, shifts |
| 1 | z (zero) | the same |
| 2 | v (overflow) | add, subtract, LSL |
| 3 | c (carry) | add, subtract, both shifts |
| 4 | cb (carry-block) | only SETF and RSTRF |

`c*` is the carry that arithmetic actually uses: it equals `c` when `cb` is
clear and is 0 when `cb` is set. With `cb` set (`SETCB`), ADD, SUB, INC, DEC
and the shifts behave like plain single-precision operations. With `cb`
clear (`CLCCB` clears c and cb together), a chain such as `ADD(2,4,6);
ADD(1,3,5)` adds two 32-bit numbers.

## How the flags are computed

This is the part that most needs care when the design is changed or checked
against another HERA implementation.

- **ADD / INC**: `r = x + y + c*`. c is the carry out of bit 15. v is set on
  two's-complement overflow.
- **SUB / DEC**: `r = x - y - c*`. The carry works as a *borrow*: c is set
  when `x < y + c*` (unsigned). The next SUB in a multi-word chain subtracts
  that borrow. CMP(a,b) is `SUB(0,a,b)`, so it honours `c*` as well.
- **LSL(d,u)**: `{c, d} = {d, c*}` shifted left. The carry enters only once,
  at bit `u-1`. The new c is the last bit shifted out and `v = d[15] ^ c`.
  For u = 1 this gives exactly the flags of `d + d + c*`.
- **LSR(d,u)**: `{d, c} = {c*, d}` shifted right. The carry enters once, at
  bit `16-u`. The new c is the last bit shifted out. v is unchanged.
- **Shift by 0**: d, v and c are unchanged. s and z are set from d.
- **UMULLO, UMULHI, AND, OR, NOT, XOR, NAND**: these set s and z from the
  result and leave v and c alone.
- **SETLO and SETHI change no flags.** The branch sequences depend on this:
  `BREQ` assembles to `SET(t,label); BR(z,t)`, and it must still see the z
  flag left by the preceding CMP.
- **SETF(m,v)**: `f = (f & ~m) | (v & m)` over all five bits. Mask 8 is c and
  mask 16 is cb.
- **SAVEF(d)** writes all five bits, including cb, into d. **RSTRF(a)**
  restores all five bits from a.
- LOAD, STORE and all control-flow instructions leave the flags alone.

## Instruction encoding

The architecture says what each instruction does and that each one fits in
16 bits. The bit layout below is this implementation's own. It is defined
once, in `rtl/hera_pkg.sv`, and the test assembler repeats it independently.

| bits 15..12 | layout of bits 11..0 | instructions |
|---|---|---|
| `0000` | `sub[11:8]`, register in `[3:0]` | NOP 0, HALT 1, RETURN 2, SWI 3, RTI 4, SAVEF(d) 5, RSTRF(a) 6 |
| `0001` | `kind[11:10] x1[9:8] x2[7:6] 00 a[3:0]` | BR (kind 0), BRN (1), BR2 (2) |
| `0010` | `o[11:4] a[3:0]` | CAL(o,a), o is 8 bits |
| `0011` | `m[11:7] v[6:2] 00` | SETF(m,v), both 5 bits |
| `010` + bit 12 | `o[12:8] a[7:4] d[3:0]` | LOAD(o,a,d), o is 5 bits |
| `011` + bit 12 | `o[12:8] a[7:4] b[3:0]` | STORE(o,a,b) |
| `1000` | `d a fn` | AND 0, OR 1, NOT 2, XOR 3, NAND 4 (`d = d op a`) |
| `1001` | `d u 00 fn` | INC 0, DEC 1, LSL 2, LSR 3 (u is 4 bits) |
| `1010` to `1101` | `d a b` | ADD, SUB, UMULLO, UMULHI |
| `1110` / `1111` | `d v[7:0]` | SETLO / SETHI |

The branch rules are:

- BR(x,a) jumps to the address held in register a when flag x is set.
- BRN(x,a) jumps when flag x is clear.
- BR2(x1,x2,a) jumps when x1 is set or x2 is clear, so `BR2(0,0,t)` always
  jumps.

Flag numbers here are s = 0, z = 1, v = 2 and c = 3. The carry-block flag
cannot be tested by a branch.

SETLO loads `{8'h00, v}`. SETHI ORs `v << 8` into the register. So the usual
pair `SETLO(d, v & 255); SETHI(d, v >> 8)` loads any 16-bit constant.

## Microarchitecture

`hera_core` is a multi-cycle sequencer with no pipeline. The instruction
memory is read synchronously at the address the PC is about to take. So
when an instruction finishes, the next instruction word arrives in the very
next cycle, and most instructions take one clock:

| instruction | cycles | what happens in each cycle |
|---|---|---|
| ALU ops, SETF, SAVEF, RSTRF, STORE, branches, NOP, SWI, RTI | 1 | execute and write back |
| LOAD | 2 | issue `M[a+o]`; write d |
| CAL(o,a) | 4 | `M[SP] = PC+1`, `PC = a`; `OFP = FP`; `FP = SP`; `SP = SP + o` |
| RETURN | 3 | read `M[FP]`; `PC = word`, `SP = FP`; `FP = OFP` |
| HALT | 1 | stops, PC unchanged, until reset |

One extra cycle after reset fetches the word at address 0. The register file
has a single write port, so CAL and RETURN are split into steps. Each step
reads its source before anything overwrites it, which gives the
architecture's "all at once" meaning. For RETURN this means SP takes the FP
of the frame being left, which is the caller's SP at the time of the call.

The frame convention that CAL and RETURN support, from FP upwards, is:

| address | contents |
|---|---|
| FP+0 | return address |
| FP+1 | saved old FP (control link) |
| FP+2 | static link |
| FP+3 | return value |
| FP+4 and up | parameters, then locals, temporaries and saved registers |

SP points above the frame. `CALL(t, 5, f)` therefore leaves room for a
one-word return value and one parameter.

SWI and RTI are named by the architecture but not defined. Here they advance
the PC like NOP and raise `unimpl` for one cycle.

### Modules

| file | role |
|---|---|
| `rtl/hera_pkg.sv` | shared types (`flags_t`, opcode enums) and register numbers |
| `rtl/hera_top.sv` | core with a 2^AW-word instruction memory and data memory, plus a host port |
| `rtl/hera_core.sv` | decode, sequencing, PC, register and flag write-back, memory requests |
| `rtl/hera_alu.sv` | combinational arithmetic, logic, multiply, shifts, SETLO/SETHI and the flag rules above |
| `rtl/hera_regfile.sv` | R1 to R15 as flip-flops, with R0 hard-wired to zero; 3 read ports, 1 write port |
| `rtl/hera_flags.sv` | the five-bit flag register, with per-flag and masked writes |
| `rtl/hera_branch_cond.sv` | the BR, BRN and BR2 condition |
| `rtl/hera_mem.sv` | single-port, synchronous-read, write-first word memory (block RAM style) |

### Top-level interface

`hera_top` has one parameter, `AW` (default 16). It sets the size of both
memories: 2^16 words each at the default.

Programs and data are loaded through the host port:

- The host may use the port only while `rst_n` is low or `halted` is high.
  An assertion checks this.
- `host_en` hands both memories to the host.
- `host_sel` picks the memory: 0 for instructions, 1 for data.
- `host_we` writes `host_wdata` to `host_addr`.
- `host_rdata` returns the addressed word one cycle later.

Releasing `rst_n` starts execution at address 0. `halted` rises after HALT.
`dbg_ra`/`dbg_rd` read any register combinationally. `retire` pulses once for
each instruction that completes.

Reset clears the registers, the flags and the PC. The memories are not reset.

## Choices made where the architecture is silent or inconsistent

- **Encoding**: as above. Any other layout only changes `hera_pkg` and the
  decode in `hera_core`.
- **Harvard memories**: instructions and data sit in separate memories. The
  architecture fixes only the 2^16-word data space.
- **Flags of SETLO/SETHI**: one general statement says all arithmetic
  operations except SAVEF set flags. The compare-and-branch sequences need
  SET to leave the flags alone, and this design follows them.
- **RSTRF**: one table entry masks the restored value with 7. Carry-block is
  also described as something that can be saved and restored. This design
  restores all five bits.
- **UMULHI** returns the high half of the product. **SETHI** ORs into the
  high byte. **BRN** jumps when the flag is clear.
- **ZERO(d)** is `AND(d,0)`, since AND takes two operands.
- Flags that are otherwise unspecified follow the rules listed above: v for
  LSR, v and c for multiply and logic, and shifts by 0.
- SWI/RTI do nothing, as described above.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it does |
|---|---|
| `hera_alu_tb` | 60,000 random and corner-case operations against a reference that uses integer arithmetic and bit-by-bit shift loops |
| `hera_regfile_tb`, `hera_flags_tb`, `hera_mem_tb` | random traffic against shadow models; the memory test covers all 64 Ki words |
| `hera_branch_cond_tb` | exhaustive over kind, flag numbers and flag values |
| `hera_core_tb` | the core with testbench memories; a nested CAL/RETURN program and 150 random programs, compared with the reference model |
| `hera_top_tb` | the full processor at default size (see below) |

`hera_core_tb` compares registers, flags, PC, the memory written and the
exact cycle count with the reference model.

`hera_top_tb` runs the whole processor at its default size, loading each
program through the host port. Its programs are:

- the single-precision sum idiom, with the carry set but blocked;
- the double-precision add idiom, with a carry that overflows the high word;
- the `times2` function-call idiom with its stack frame;
- a recursive factorial of 7 (eight nested frames);
- a counting loop that uses CMP, BRLT, BREQ, BRGE, BRNE, SAVEF/RSTRF,
  shifts, multiply, NEG, FLAGS, SWI and RTI;
- 40 random programs.

Results are checked against the reference model and against hand-worked
values: 21×2+1 = 43, 7! = 5040, 1+…+100 = 5050, and 0xBEEF × 0x1234 =
0x0D93968C. The testbench also counts how often each mechanism occurs: carry
used, carry blocked, carry out, borrow, overflow, each branch kind taken and
not taken, CAL, RETURN, multi-bit shifts, dropped writes to R0, and so on. It
fails if any mechanism never happened.

`tb/hera_tb_pkg.sv` holds the test assembler (every true instruction plus
the pseudo-instructions SET, CMP, NEG, ZERO, CLCCB, SETCB, FLAGS, JUMP,
BREQ, BRNE, BRLT, BRGE and CALL, with labels) and the reference model.

To run a testbench with Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module hera_top_tb \
  rtl/hera_pkg.sv rtl/hera_mem.sv rtl/hera_regfile.sv rtl/hera_alu.sv \
  rtl/hera_flags.sv rtl/hera_branch_cond.sv rtl/hera_core.sv rtl/hera_top.sv \
  tb/hera_tb_pkg.sv tb/hera_top_tb.sv
./obj_dir/Vhera_top_tb
```

For other blocks, swap in the block's testbench and the files it uses. All
tests run in seconds.

## Limits

- SWI and RTI have no interrupt behaviour.
- The binary encoding is not compatible with any other HERA toolchain.
- The design favours clarity over speed: no pipeline, and a combinational
  16×16 multiplier in the ALU.
