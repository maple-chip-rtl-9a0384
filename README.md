# MAPLE: a fixed-latency RISC processing element for statically scheduled multiprocessors

MAPLE is a processing element (PE) for a multiprocessor whose parallel
schedule is fixed by the compiler, down to single statements. For that to
work, the compiler must know exactly when every instruction on every
processor produces its result, and when a value sent by one processor
arrives at another. MAPLE makes both predictable:

* **A pipeline with fixed timing.** MAPLE is a 32-bit RISC processor. Its
  instruction set extends DLX, and it has a five-stage pipeline. Every
  operation takes a fixed number of clocks, floating-point ones included.
  There are no caches and no variable-latency units. The only hazards are
  fixed one- and two-cycle penalties, so a scheduler can count them.
* **Receive registers.** Each PE has 16 32-bit *receive registers* (RR)
  besides its 32 integer and 32 floating-point registers. A sending PE's
  MEM stage drives one of its registers straight into a receive register
  of another PE. The receiver's ID stage reads it on the next cycle. No
  memory, message queue or handshake is involved.

This repository holds synthesizable SystemVerilog for the processor, a
PE (processor plus instruction RAM and main memory), and a four-PE cluster
joined by the register-transfer fabric. It also holds self-checking
testbenches, including one that runs a pi-series calculation across the
four PEs.

## Structure

```
maple_cluster                     four PEs + transfer fabric (top)
├── maple_pe  x4                  one processing element
│   ├── maple_chip                the processor
│   │   ├── maple_gpr             32 x 32-bit integer registers
│   │   ├── maple_fpr             32 x 32-bit FP registers (pairs for double)
│   │   ├── maple_rr              16 x 32-bit receive registers
│   │   ├── maple_alu             integer unit
│   │   └── maple_fpu             floating unit
│   │       ├── maple_fp_arith x2 add/sub/mul/div/compare (single, double)
│   │       └── maple_fp_round    normalise, round (four IEEE modes), pack
│   ├── maple_iram                32 kbyte instruction RAM
│   └── maple_lmem                512 kbyte main memory
└── maple_rr_net                  PE-to-PE receive-register fabric
maple_pkg                         opcodes, enums, rr_msg_t, pe_events_t
```

The original PE board also has a flash ROM with a monitor program, a
serial link to a host, a software-controlled cache, a DMA controller and a
network interface to a larger (R-Clos) network. None of these is described
in enough detail to build, and none is here. Each PE instead has a *loader
port*. While the cluster is held in reset, the loader writes the
instruction RAM and main memory. Afterwards the host reads main memory back
through the same port.

## Receive registers and static scheduling

This is the part that differs from an ordinary RISC. Two instructions use it:

| instruction | encoding | effect |
|---|---|---|
| `SENDRR rs1, rr, pe` | I-type, opcode `0x3C`: rs1 = data register, rd field = RR index (low 4 bits), imm = destination PE (low 4 bits) | in its MEM cycle, put GPR[rs1] on the PE's `tx` port, addressed to receive register `rr` of PE `pe` |
| `MOVRR2I rd, rr` | R-type, SPECIAL function `0x38`: rs1 field = RR index | in ID, read RR[rr]; write it to GPR[rd] in WB |

Timing, in cycles of the common clock:

```
sender:    IF   ID   EX   MEM ──tx──┐
                               t    │ maple_rr_net (combinational)
receiver:                           └─> RR written at the end of cycle t
                                        MOVRR2I in ID at cycle t+1 or later reads it
```

An RR read in the same cycle as the write also returns the new word, so
the earliest legal read is in ID during cycle t. The fabric
(`maple_rr_net`) is combinational. It delivers each PE's `tx` word to the
`rx` port of the PE named in `tx.dst`. Words addressed to a PE that does
not exist are dropped.

Nothing in the hardware waits for data. An RR has no full or empty flag,
and MOVRR2I never stalls. The compiler guarantees that the reader comes
after the writer, and that no two PEs send to the same PE in the same
cycle. If two PEs do, the lowest-numbered sender is delivered, `collision`
rises and a simulation assertion fires. All PEs share one clock and one
reset, so they run in lockstep from the same starting cycle. That is what
makes cross-PE schedules computable. The cluster testbench shows it: PEs
1–3 each send the two halves of a double to PE 0. They are staggered by
two cycles each so that PE 0 receives one word per cycle. PE 0 waits a
fixed six instructions and then reads RR2…RR7.

To send a double or FP value, move it to integer registers (`MOVFP2I`)
and send the halves. On the receiving side, use `MOVRR2I` and then
`MOVI2FP`.

## The pipeline (`maple_chip`)

| stage | work |
|---|---|
| IF  | fetch `imem[pc]` (combinational read), pc += 4 |
| ID  | decode; read GPR, FPR (one or two 32-bit words per operand) and RR |
| EX  | integer unit or floating unit, both single-cycle; operand forwarding; branch/jump decision |
| MEM | data memory over a 64-bit port (combinational read, byte-enabled write at the edge); SENDRR drives `tx` |
| WB  | write GPR or FPR (a double writes an even/odd pair) |

Timing rules a scheduler can rely on:

* One instruction per cycle. ALU and FPU results are forwarded from EX/MEM
  and MEM/WB, so dependent instructions run back to back. That holds for
  double-precision divides too, because the FPU is single-cycle.
* **Load-use interlock:** an instruction that uses the register loaded by
  the instruction just ahead of it (LW/LH/LB/LF/LD) waits one cycle.
* **Taken branch or jump:** costs two cycles. Branches resolve in EX, fetch
  predicts not-taken, and the two younger instructions are squashed. There
  is no delay slot.
* **TRAP** stops fetching. `halted` rises 5 cycles after the TRAP was
  fetched.

So a straight-line program of N instructions with S interlocks and B taken
branches, started by reset release, raises `halted` in cycle
`(N − 1) + 5 + S + 2B`. The testbenches check exactly this formula.

### Instruction set

Encodings follow the public DLX definition. The R-type format is
`0|rs1|rs2|rd|func`, I-type is `op|rs1|rd|imm16`, FP R-type is
`1|fs1|fs2|fd|func`, and J-type is `op|offset26`. Branch and jump offsets
are relative to the address of the next instruction.

* Integer: ADD(U), SUB(U), AND, OR, XOR, SLL, SRL, SRA, SEQ, SNE, SLT, SGT,
  SLE, SGE and their immediate forms. Also ADDUI/SUBUI, ANDI/ORI/XORI
  (zero-extended) and LHI. Nothing traps on overflow.
* Memory: LB, LBU, LH, LHU, LW, LF, LD, SB, SH, SW, SF, SD. LD and SD move
  an even/odd FP register pair and need an address that is a multiple of 8.
  Memory is big-endian. The data port is 64 bits wide, so LD/SD also take
  one cycle. `dmem_be[7]` and `data[63:56]` hold the lowest byte address.
* Control: BEQZ, BNEZ, BFPT, BFPF, J, JAL, JR, JALR. The link register is
  R31 and receives the address after the jump. TRAP halts the processor.
* Floating point: ADDF/D, SUBF/D, MULTF/D, DIVF/D, CVTF2D, CVTD2F, CVTF2I,
  CVTD2I, CVTI2F, CVTI2D, EQ/NE/LT/GT/LE/GE for F and D (these set the FP
  status bit tested by BFPT/BFPF), and MULT/MULTU/DIV/DIVU on integers held
  in FP registers. Also MOVF, MOVD, MOVFP2I and MOVI2FP.
* Special registers: MOVI2S (SPECIAL `0x30`, S[rd] ← GPR[rs1]) and MOVS2I
  (SPECIAL `0x31`, GPR[rd] ← S[rs1]). The only special register is S0, the
  FP status register; other numbers read as zero and ignore writes.
* MAPLE extensions: SENDRR and MOVRR2I (above).

Not implemented: RFE and interrupts, the unsigned set-compare
instructions, and traps of any kind.
Unknown opcodes execute as no-ops.

A double occupies an even/odd FP register pair, with the upper word
(sign, exponent) in the even register.

### FP status register

| bits | meaning |
|---|---|
| 0 | condition, set by the FP compares, tested by BFPT/BFPF |
| 2:1 | rounding mode: 0 nearest even, 1 toward zero, 2 toward +∞, 3 toward −∞ |
| 7:3 | sticky exception flags: invalid, divide-by-zero, overflow, underflow, inexact (bit 7 … bit 3) |

Every FP instruction ORs its exception conditions into bits 7:3 at the end
of EX. Only MOVI2S clears them. MOVS2I reads the register in EX, so it sees
every older instruction. An FP instruction right after a MOVI2S already
rounds in the new mode. Reset value: all zero (nearest even, no flags).
No exception traps; software polls the flags.

## Floating unit (`maple_fpu`)

The unit is combinational, so a double divide finishes in the same single
EX cycle as an add. Each precision has its own `maple_fp_arith`, which
builds an exact magnitude for the operation. Addition aligns the smaller
operand with a sticky bit. Multiplication forms the full significand
product. Division pre-normalises both significands, forms MW+7 quotient
bits, and keeps a sticky bit from the remainder. `maple_fp_round` then
normalises, shifts tiny results to the denormal position, rounds in the
selected mode and packs the result. The same rounder serves the
double-to-single, single-to-double and integer-to-float conversions.

IEEE 754-1985 behaviour that is implemented:

* correctly rounded +, −, ×, ÷ in all four rounding modes;
* denormal operands and results (gradual underflow);
* infinities, signed zeros (an exact zero sum is −0 only when rounding
  toward −∞), and quiet NaN results for invalid operations;
* ordered and unordered compares;
* the five exception conditions. Underflow is raised when the result is
  tiny before rounding and inexact. Ordered compares (LT/GT/LE/GE) with a
  NaN raise invalid; EQ/NE do not.

Left out: traps on exceptions, and signalling NaNs (every NaN operand is
treated as quiet). Square root, remainder and round-to-integer are absent
too, as DLX has no instructions for them.

Float-to-integer conversions always truncate, as C does, regardless of
the rounding mode. They saturate, and NaN converts to `0x80000000`; both
raise invalid, and a dropped fraction raises inexact. Integer division by
zero returns all ones and raises no flag.

In hardware this is a long combinational path, a double-precision divider
above all. A faster clock would need the FPU pipelined and the extra
cycles made part of the fixed latency table.

## Memories and the loader (`maple_pe`)

* `maple_iram`: 32 kbyte. Asynchronous read for fetch; synchronous write
  from the loader.
* `maple_lmem`: 512 kbyte, 64 bits wide. Port A belongs to the processor:
  asynchronous read of an aligned doubleword, and a byte-enabled write.
  Port B is the loader's 32-bit word port. If both write one doubleword in
  the same cycle, the processor wins and the loader's write is lost.

Loader port: `ld_we` with `ld_iram = 1` writes a word of the instruction
RAM, and with `ld_iram = 0` a word of main memory. `ld_rdata` always shows
the main-memory word at `ld_addr`. Addresses are byte addresses, and
memories wrap modulo their size.

## Events

Every PE outputs `pe_events_t`, a set of one-cycle strobes: retire,
load_stall, forward, branch (taken), fp_op, send, receive and rr_read. The
cluster testbench counts them to show that each mechanism was exercised.

## Simulating

Verilator 5 with `--timing`. Every testbench prints
`TB_RESULT checks=N failures=M` and stops. For example, the full cluster
running the pi series:

```
verilator --binary --timing -Wno-fatal --top-module tb_maple_cluster \
  -y rtl -y tb +libext+.sv -Irtl rtl/maple_pkg.sv tb/maple_asm_pkg.sv \
  tb/tb_maple_cluster.sv -o sim && ./obj_dir/sim
```

Replace `tb_maple_cluster` with any other testbench:

| testbench | checks |
|---|---|
| `tb_maple_cluster` | Four PEs at the default sizes compute pi from 30,000 series terms in double precision, split into quarters. PEs 1–3 send their partial sums to PE 0 through receive registers. The result matches, bit for bit, the same sequence of operations in the simulator's double arithmetic (3.141559320256461). PE 0 halts in exactly 60,040 cycles. Every event type occurs. It takes under a minute. |
| `tb_maple_pi_single` | One PE at the default sizes runs all 30,000 terms alone. The result is bit-exact, the FP status register shows only inexact, and the halt cycle is exact (240,021). |
| `tb_maple_pe` | loader, array sum with a load-use interlock in every iteration, an RR read, a send, exact halt cycle |
| `tb_maple_chip` | directed program over the instruction set, including rounding-mode changes and flag reads through the FP status register; exact send and halt cycles, interlock and branch counts |
| `tb_maple_fpu` | about 320,000 checks on random and special-value operands over the whole exponent range, denormals included. In nearest-even mode, doubles are checked against the simulator's IEEE arithmetic. Singles are checked in all four modes against a rounder in the testbench, applied to exact double results; that rounder also gives the expected flags. In the directed modes, doubles are checked by properties. Round-down and round-up must be equal for an exact result and one unit apart otherwise, round-toward-zero must match one of them, and products of short significands must be exact. |
| `tb_maple_alu`, `tb_maple_gpr`, `tb_maple_fpr`, `tb_maple_rr`, `tb_maple_iram`, `tb_maple_lmem`, `tb_maple_rr_net` | random operations against reference models |

`tb/maple_asm_pkg.sv` is a small assembler: one function per instruction,
returning its encoding. The test programs are written with it.

## Pi-series timings

The same two-terms-per-iteration loop (14 instructions, plus 2 cycles for
the taken branch, so 8 cycles per term) gives:

| configuration | cycles to halt |
|---|---|
| one PE, 30,000 terms | 240,021 |
| four PEs, 7,500 terms each, partial sums sent through receive registers | 60,040 |

The four-PE version is 4.0 times faster. This hand-split workload is
perfectly parallel. Beyond 8 cycles per term, PE 0 spends only 40 cycles,
on setup, the fixed wait for the six words crossing the fabric, and the
final additions. The
original work reports about 2.25 times for four PEs, on compiler-generated
parallel code, and 17.25 million cycles for one PE running gcc-compiled
code. Neither program is available, so those figures cannot be compared
with these.

## How far to trust it, and where it departs from the original

Taken from the published description of MAPLE:

* a 32-bit RISC extending DLX, with five pipeline stages and fixed
  operation latency;
* 32 integer, 32 floating-point and 16 32-bit receive registers;
* receive registers read in the ID stage;
* transfers sent from the sender's MEM stage straight into the receiver's
  receive register;
* a 32/64-bit IEEE 754 floating unit;
* 32 kbyte instruction RAM and 512 kbyte main memory per PE;
* four PEs per cluster.

Choices made here, because the description does not give them:

* all instruction encodings, including SENDRR and MOVRR2I;
* forwarding, the load interlock, and branch resolution in EX without a
  delay slot;
* the single-cycle FPU, the FP status register layout, and the handling
  of NaNs and float-to-integer conversion;
* the combinational transfer fabric and its conflict rule;
* the loader port, and the 64-bit data port;
* reset values (all registers zero, PC 0).

The original chip's internals (its integer unit, its floating unit and
its pipeline control) were not available. These modules do what the
description requires; they are not reproductions of the original
circuits.

For scale, the original chip had about 21,000 gates in the integer unit,
146,000 in the floating unit and 5,000 in the receive registers.
