# SPUR CPU–FPU coprocessor interface in SystemVerilog

The SPUR workstation's floating-point unit (FPU) is a tightly coupled coprocessor. It has no
instruction fetch of its own. The CPU issues one instruction per cycle and broadcasts the opcode
and the three register specifiers of *every* instruction to the FPU, including plain integer
instructions. The FPU decodes this stream in parallel with the CPU and follows the CPU pipeline
cycle by cycle; this is called instruction tracking. It picks out its own instructions and runs
them alongside the CPU:

* arithmetic in an execution unit that takes one operation at a time;
* loads and stores on the second port of a dual-ported register file, so memory transfers
  overlap arithmetic.

Only a handful of wires coordinate the two chips:

* **fpuBusy**: the execution unit is occupied. The CPU holds back the next FPU operation.
* **fpuSuspend**: the CPU pipeline is frozen, for example by a cache miss. The FPU must not
  advance into a state that a trap could not undo.
* **TRAP_CALL**: an internal instruction the CPU broadcasts when it takes a trap. The FPU cancels
  the last instruction it received.
* **fpuExcept** and **fpuBrT_F**: the exception and compare status.

This repository implements both sides of that interface as synthesizable RTL:

* the CPU's coprocessor logic: mode bits, interlocks, the FpuPC register and trap requests;
* a complete FPU built around the interface: instruction tracker, execution unit, 15 × 87-bit
  register file, status word and memory format conversion.

The rest of the CPU and the data cache are not included. The top-level module has ports where
they connect.

## Structure

```
spur_coproc_top
├── cpu_fpu_if      CPU side: Upsw bits, issue interlocks, FpuPC, trap requests
├── data_valid      CPU copy of the dataValid composite
└── fpu_chip        the coprocessor
    ├── data_valid  FPU copy of the dataValid composite
    ├── fpu_icu     interface control unit: reception, suspension, kill, load/store pipe
    │   └── fpu_memfmt   memory word <-> 87-bit register conversion
    ├── fpu_eu      execution unit sequencer (cycle counts, NoWr, kill)
    │   └── fpu_arith    combinational arithmetic datapath
    ├── fpu_regfile 15 x 87-bit, port A (EU) and port B (loads/stores/FMOV)
    └── fpu_fpsw    status word: flags, enables, compare bit -> fpuExcept, fpuBrT_F
```

`spur_fpu_pkg` holds the types and constants shared by these modules:

* the register layout;
* the opcodes;
* the instruction classes;
* the cycle counts;
* the Fpsw bit positions.

### Interface signals (top level)

| group | signals |
|---|---|
| CPU issue stage (in) | `cpu_valid`, `cpu_instr` (7-bit opcode, rs1, rs2, rd), `cpu_pc`, `core_susp` (CPU's own pipeline suspension), `trap_mask` |
| CPU issue stage (out) | `cpu_issue`, `fpu_stall`, `emul_trap`, `exc_trap`, `fpu_pc`, `brtf` |
| Upsw | `upsw_we`, `upsw_parallel`, `upsw_enable` → `fpu_parallel`, `fpu_enable` |
| cache controller | `data_may_be_valid`, `proc_tag_match`, `data_is_valid`, 64-bit `ld_data`, `st_data`, `st_data_oe`; `cpu_data_valid` is the composite |
| observation | `fpu_busy`, `fpu_except`, `fpu_new_instr`, `fpu_suspend` |

Between `cpu_fpu_if` and `fpu_chip` run the original interface wires:

* from the CPU: `fpuNewInstr`, `fpuOPCODE`, `fpuRS1`, `fpuRS2`, `fpuRD` and `fpuSuspend`;
* from the FPU: `fpuBusy`, `fpuExcept` and `fpuBrT_F`.

## Timing model

The original machine uses four non-overlapping clock phases per 140 ns cycle, with signals
driven and latched on particular phases.

**One clock edge per cycle.** Here the phases are folded into a single rising clock edge per
SPUR cycle. Every signal is sampled at the edge that ends the cycle in which the original latches
it. The design is therefore cycle-accurate, not phase-accurate.

**Naming the cycles.** An instruction that the CPU issues in cycle *t* is in its fetch cycle
(Ifet) in *t*. From the FPU's point of view:

* its first execution cycle (Exec/Ex1) is *t+1*;
* a load or store has its memory cycle (Mem) in *t+2*;
* it writes its register in cycle *t+3* (Wr).

**Suspension.** `core_susp` high in cycle *t* means that cycle *t+1* is suspended.

**Reset.** Reset is synchronous and active high. After reset the Upsw bits are clear: no FPU and
sequential mode. Software enables the FPU with `upsw_we`.

## The FPU pipelines

### Arithmetic (`fpu_eu`)

FADD, FSUB, FABS, FNEG, FCMP, CVTS and CVTD take 3 execution cycles, FMUL 8 and FDIV 20. A write
cycle follows. `fpuBusy` is high from Ex1 through ExN and low in the write cycle.

**Commit.** The result, the exception flags and the compare bit are committed at the edge that
ends ExN. So `fpuExcept` and `fpuBrT_F` are already valid in the write cycle.

**Back-to-back operations.** The execution unit takes a new operation at any edge where it is not
in Ex1..ExN. A second operation can arrive in the first execution cycle of the previous one,
before the CPU has seen `fpuBusy`. The interface control unit then holds it in a one-entry buffer.
It starts in the cycle after the write cycle. After that the CPU's interlock keeps further
operations away.

### Loads, stores and FMOV (`fpu_icu`)

These go through the interface control unit's own Exec → Mem → Wr stages on register port B. They
run in parallel with an arithmetic operation.

**Mem stage.** A load or store repeats Mem until it sees `dataValid`. A store drives its word on
the bus during Mem. A load writes its register at the end of Wr.

**No forwarding.** There is no forwarding: the loaded value can be used by the third instruction
after the load. Software must keep that spacing, and must use SYNC before storing the result of an
arithmetic operation.

**Memory formats.**

* Single-precision values travel in bits [31:0] of the 64-bit data word, doubles in the full
  word, both in IEEE format.
* An extended value needs two transfers:
  * EXT1 carries sign, exponent, round tag and data type in bits [22:0];
  * EXT2 carries the 64-bit fraction.

  Port B can write the two parts of a register separately.

### Register and status formats

An operand register is 87 bits, most significant first:

| sign (1) | exponent (17) | fraction (64) | round tag (2) | data type (3) |
|---|---|---|---|---|

**Register fields.**

* The exponent is biased by 65535.
* The fraction has an explicit leading one.
* Data type codes: 0 zero, 1 single, 2 double, 3 extended, 4 infinity, 5 NaN, 6 denormal.

**Status word (Fpsw).** The status word is reached as register specifier 15 by loads and stores.

* Bits [3:0] are the sticky flags: operand trap, overflow, underflow, inexact.
* Bits [7:4] are their trap enables. They reset to 0111, so every flag except inexact traps.
* Bit 8 is the compare result.

`fpuExcept` is high while any enabled flag is set. It stays high until software writes the Fpsw.

**FCMP.** FCMP takes its condition from the low three bits of the Rd field: EQ, NE, LT, LE, GT,
GE, unordered, ordered.

## Suspension, NoWr and TRAP_CALL

This is the subtle part of the interface. The rule it has to keep is that every instruction
issued before a trapping instruction completes, while the victim and everything after it can be
cancelled and restarted.

**Parked instructions.** An instruction broadcast in a cycle whose `fpuSuspend` is high is still
in its fetch cycle as far as the FPU is concerned. The ICU parks it and receives it only when the
suspension ends. If a TRAP_CALL is broadcast first, the TRAP_CALL overwrites it, and it is never
executed.

**The young operation.** The operation received just before a suspension began was issued
*after* the instruction that caused the suspension. It may keep executing, but it may not commit
while the suspension lasts. If its last execution cycle falls in the suspension, the execution
unit stays in that cycle with `fpuBusy` high. This is the NoWr cycle, and the operation commits
at the first edge after the suspension ends. Operations received earlier finish normally.

**Loads and stores during a suspension.** A load or store in Exec does not enter Mem during a
suspension. So a `dataValid` pulse meant for the CPU's own missing load cannot be mistaken for
its data.

**TRAP_CALL.** On TRAP_CALL the FPU cancels the last instruction it received, if that was an FPU
instruction, wherever it is: in the buffer, in the execution unit, or in Exec, Mem or Wr. Each
received instruction carries a 6-bit sequence tag, so the kill and block requests name exactly
one operation. A load or store still waiting in Mem for its data when TRAP_CALL arrives is
abandoned as well: only a page or bus fault traps during an outstanding access, and the CPU
restarts the faulting access after the trap.

The CPU side (`cpu_fpu_if`) mirrors this reception logic. It therefore knows which issued
operations are still outstanding after a TRAP_CALL.

## CPU side (`cpu_fpu_if`)

**Upsw bits.** Without `fpuEnable`, an FPU instruction is not issued and `emul_trap` asks the CPU
to trap to software emulation. Without `fpuParallel` (sequential mode), nothing is issued after an
FPU operation until it has finished.

**Interlocks.** `fpuBusy`, `fpuExcept` and `fpuBrT_F` are latched once per cycle.

* An FPU operation is held back (`fpu_stall`) while the latched busy is high. It issues one full
  cycle after `fpuBusy` falls.
* SYNC is held until every operation issued so far has finished.
* Loads, stores and CPU instructions are not held back by the FPU.

**FpuPC.** FpuPC holds the address of the last issued operation that can raise an exception:

* FADD, FSUB, FMUL, FDIV, FCMP, CVTS and CVTD qualify;
* loads, stores, FMOV, FABS, FNEG and SYNC do not.

The register is written in the operation's second execution cycle, which the unit recognises by
the rising edge of the latched busy. It is not written while an exception is pending. So after
two operations in series where the first raises an exception, FpuPC still points to the first.

**Exception trap.** `exc_trap` requests the exception trap while the latched `fpuExcept` is high.
It is not raised:

* in suspended cycles;
* in a cycle in which a suspension begins;
* while `trap_mask` is high. The CPU sets `trap_mask` in its handler so that the handler can
  read and rewrite the Fpsw.

While `exc_trap` is high, only the internal instructions TRAP_CALL, MISS and READ_PC are issued.

## Encodings chosen here

The original gives mnemonics but no opcode values. This design uses:

| opcodes | instructions |
|---|---|
| 0x40–0x48 | FADD, FSUB, FMUL, FDIV, FABS, FNEG, FCMP, CVTS, CVTD |
| 0x49, 0x4A | FMOV, SYNC |
| 0x50–0x57 | LD_SGL, LD_SGL_RO, LD_DBL, LD_DBL_RO, LD_EXT1, LD_EXT1_RO, LD_EXT2, LD_EXT2_RO |
| 0x58–0x5B | ST_SGL, ST_DBL, ST_EXT1, ST_EXT2 |
| 0x7C, 0x7D, 0x7E | READ_PC, MISS, TRAP_CALL (CPU-internal) |

Any other opcode is treated as a CPU instruction. For stores the source register is the Rs2 field.
For FMOV, FABS, FNEG and the conversions it is Rs1.

## Arithmetic

The arithmetic is deliberately simple. The interface is the subject here, not the numerics.

* Results are normalised and truncated (round toward zero) to the precision of the wider
  operand: 24, 53 or 64 significant bits.
* Any discarded bit sets the inexact flag.
* Results beyond the exponent range of that precision become infinity with the overflow flag, or
  zero with the underflow flag.
* NaN or denormal operands, ∞−∞, 0×∞, x/0 and ∞/∞ raise the operand trap and give a NaN.
* FABS and FNEG never raise anything.
* Division uses a combinational 192-bit divider, which dominates the area of `fpu_arith`.

Not implemented:

* IEEE rounding modes;
* the use of the round tag (it is carried, not interpreted);
* denormal results.

## Departures and open points

* **Phases folded.** The phase-level timing is folded into one edge per cycle. The FpuPC update
  and the register write therefore happen at cycle edges, not in phi1 or phi3.
* **FMUL length.** The timing diagram of back-to-back FMULs draws nine execution cycles, while
  the cycle table gives 8. This design uses the table.
* **Parking vs. progressing.** One timing diagram shows an FPU operation progressing through its
  execution cycles during a suspension. This design instead parks an instruction that arrives
  during a suspension. It lets an operation already received run, but blocks its commit. Both meet
  the requirement that the operation can still be killed.
* **dataValid.** dataValid is the composite of three cache controller pulses. The combining
  function is not given; this design uses
  `dataValid = dataIsValid | (dataMayBeValid & procTagMatch)`.
* **fpuEnable / fpuPresent.** The Upsw bit that says an FPU exists is called fpuEnable in the
  text and fpuPresent in the interconnect diagram. The text's name is used.
* **Own choices.** The following are this design's own, as is the `trap_mask` input:
  * the Fpsw layout and reset enables;
  * specifier 15 for the Fpsw;
  * the EXT1/EXT2 split;
  * all opcode and data type codes.
* **Not built.** These are outside the design: the CPU core, the cache and its controller, the
  clock generator, the system bus, and the performance-monitor coprocessor. The CPU↔FPU register
  transfer instructions are not part of the instruction set described and are not built either.
* **Performance.** The original cites a 5–15× speed-up over contemporary floating-point
  coprocessor systems and 1.6–2.0 cycles per instruction from simulations. No benchmark is
  reproduced here.

## Synthesis

Yosys (generic cells) gives the following for `spur_coproc_top` at its defaults:

* about 1,900 cells;
* 742 flip-flop bits;
* 1,556 memory bits, which are the two register-file arrays.

There are no latches. Two things are expected in a synthesis report:

* `fpu_suspend` and the broadcast fields are direct copies of inputs, as the interface defines
  them;
* 55 of the 64 Fpsw read bits are constant zero.

## Testbenches

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it checks |
|---|---|
| `tb_data_valid` | all eight input combinations |
| `tb_fpu_regfile` | both ports, partial writes, write priority, out-of-range specifiers |
| `tb_fpu_fpsw` | flags, enables, fpuExcept, compare bit, software write/read |
| `tb_fpu_memfmt` | single/double/extended conversion both ways, special values |
| `tb_fpu_eu` | results of every operation against real arithmetic, cycle counts of the cycle table, NoWr blocking, kill |
| `tb_fpu_icu` | dispatch and buffering, load/store/FMOV timing, Mem repeated until dataValid, a CPU miss followed by an FPU load, parking, blocking, TRAP_CALL kill, Fpsw through specifier 15 |
| `tb_fpu_chip` | whole instructions through the chip pins: results read back by stores, busy lengths, overlap, FCMP → fpuBrT_F, divide-by-zero exception, NoWr, kill, dataValid composite |
| `tb_cpu_fpu_if` | emulation trap, Upsw, busy interlock, buffered second operation, FpuPC timing and suppression, SYNC, exception trap and its deferral, suspension, TRAP_CALL of a parked operation, sequential mode |
| `tb_spur_coproc_top` | end to end at default parameters (see below) |

### End-to-end test

`tb_spur_coproc_top` contains a behavioural CPU and cache. They run a program through these
scenarios:

* FPU absent (emulation traps);
* sequential mode;
* parallel mode with a busy stall, a buffered operation and SYNC;
* a CPU load miss followed by an FPU load;
* traps on a CPU page fault and on an FPU page fault, with a parked instruction, a blocked write
  and a kill;
* two operations in series where the first divides by zero. The trap kills the second operation,
  which was buffered behind the first. The handler checks FpuPC, reads and rewrites the Fpsw, and
  the program restarts at the killed operation.

The test counts each mechanism and fails if any never happens:

* stall, buffer, park, NoWr, kill, Mem wait, exception trap;
* sequential hold, emulation trap, FpuPC update, SYNC hold, fault trap;
* abandoned access, load/arithmetic overlap.

Every stored word is compared with the expected value.

### Running

Run with Verilator 5. The package comes first:

```
verilator --binary --timing --assert -Wno-fatal rtl/spur_fpu_pkg.sv rtl/*.sv \
          tb/tb_spur_coproc_top.sv --top-module tb_spur_coproc_top -Mdir obj
./obj/Vtb_spur_coproc_top
```

For a unit testbench, replace the testbench file and the top-module name.
