# Single-cycle and five-stage pipelined MIPS cores

This is a small MIPS-I integer subset built twice from the same functional
units. One build runs one instruction per clock, and the other is a classic
five-stage pipeline. Both run the same short reference program. Three `addi`
instructions load `$t1 = 0x112`, `$t2 = 0xA` and `$t3 = 0xF`. Then come
`beq $t1,$t2` (not taken), `add $t1,$t1,$t2`, `sw $t3,100($t2)` and
`or $t1,$t1,$t2`.

The pipeline has **no forwarding, no hazard detection and no branch flush**.
Correctness depends on the program's spacing. Where the spacing is too tight,
the pipeline gives a different result from the single-cycle core, and the
testbenches check that on purpose:

| program step          | single-cycle result | pipeline result |
|-----------------------|---------------------|-----------------|
| `add $t1,$t1,$t2`     | 0x11C               | 0x11C           |
| `or  $t1,$t1,$t2`     | 0x11E               | 0x11A (reads the old `$t1 = 0x112`) |
| `sw $t3,100($t2)`     | word 0x6E := 0xF    | word 0x6E := 0xF |

Supported instructions: R-type `add sub and or slt`, `addi`, `lw`, `sw`, `beq`.
Any other opcode executes as a no-op. The all-zero word is `sll $0,$0,0`. It
writes `$zero` and therefore does nothing.

## Functional units (shared by both cores)

| module | role |
|--------|------|
| `instructionFetch` | PC register and instruction ROM. The PC loads `load_address_in` on every rising edge and resets to 0. `adder_out` = PC+4, and `instruction_out` = ROM[PC[9:2]] (asynchronous read). The ROM is filled by `$readmemh` from a hex file, one 32-bit word per line. |
| `controlUnit` | Opcode → `ALUOp[1:0] AluSrc Branch MemWrite MemtoReg RegDst RegWrite`, using the standard MIPS main-decoder table. |
| `instructionDecode` | Single-cycle decode. Contains the 32×32 register file (`registerFile`), the rd/rt destination mux driven by `RegDst`, and sign extension. |
| `instructionDecodePipe` | Pipeline decode. Same, except that the destination index `writeReg` comes from the write-back stage. |
| `executionUnit` | ALU operand mux (`ALU_Src`), ALU control (`aluControl`), ALU (`alu`), and branch target = PC+4 + (imm << 2). The single-cycle unit has no instruction input, so it reads the funct field from `signExtend[5:0]`. |
| `executionUnitPipe` | Same, plus the rd/rt destination mux (`RegDstMux_out`). Funct comes from the instruction carried down the pipe. |
| `memory` | Data memory, 256 × 32, word-addressed by `aluResult[7:0]`. It starts all-zero. |
| `twotoone_mux` | `y = sel ? b : a`. It is used for the PC source (a = PC+4, b = branch target) and for write-back (a = ALU result, b = memory data). |
| `mux4_select` | `PCSrc = Branch & zero`. |

Shared encodings (opcodes, funct codes, the `ALUOp` and ALU-operation enums)
live in `mips_pkg`.

### Data memory read timing

`memory` writes on the rising edge. With `READ_REG = 1`, the default used by
both cores, it also registers the read address at that edge, the way an FPGA
block RAM with registered inputs does. `data_out` therefore shows the word
addressed in the previous cycle. After `sw $t3,100($t2)` the stored `0xF`
appears on `dataMemOut` in the following cycle, which is the behaviour this
design reproduces.

The price is that `lw` writes back the word one cycle late in both cores.
The reference programs contain no load. For programs that load, set
`DMEM_READ_REG = 0` on `mips_single_cycle` / `mips_pipeline`. This makes the
read asynchronous, and `lw` then completes in its own cycle. The single-cycle
testbench runs a `sw`/`lw`/ALU program that way.

## Single-cycle core (`mips_single_cycle`)

All work happens between two rising edges. At the closing edge the PC, the
register file and (for `sw`) the data memory update. The next PC is the branch
target when `Branch & zero`, otherwise PC+4. Ports: `clk`, `rst` and the
observation outputs `aluResult`, `zero`, `readData1`, `readData2` and
`dataMemOut`.

Cycle by cycle after reset, `aluResult` is 0x112, 0xA, 0xF, 0x108 (beq: not
zero), 0x11C, 0x6E (sw address), 0x11E. With `$t2` loaded with 0x112 instead
(`rtl/prog_single_cycle_beq_taken.hex`), beq yields zero. The PC then jumps
from word 3 to word 7, a no-op, and add/sw/or are skipped.

## Pipelined core (`mips_pipeline`)

```
 F: instructionFetch ─► IF/ID ─► D: controlUnit + instructionDecodePipe ─► ID/EX
 ─► E: executionUnitPipe ─► EX/MEM ─► M: memory, branch decision ─► MEM/WB
 ─► W: write-back mux ─► register file (in D)
```

The four pipeline registers (`InstructionFetchInstructionDecodeReg`,
`InstructionDecodeExecutionReg`, `ExecutionMemoryReg`, `MemoryWritebackReg`)
carry what their names say:
- IF/ID holds PC+4 and the instruction.
- ID/EX holds the seven controls, PC+4, the instruction, the immediate and both register values.
- EX/MEM holds the ALU result, zero, branch target, store data, destination and four controls.
- MEM/WB holds the ALU result, memory data, destination, MemtoReg and RegWrite.

None of them has an enable or a flush input. The synchronous reset clears them
to bubbles.

**Timing.** Counting cycle 1 as the first cycle after reset, instruction word
*k* is fetched in cycle *k*+1, decoded in *k*+2, executed in *k*+3, in memory
in *k*+4, and written back at the end of cycle *k*+5.

**Data hazards.** The register file is written at the rising edge and read
combinationally, with no write-through. A consumer decoded in the same cycle
as its producer's write-back still sees the old value. A consumer therefore
needs at least **three** instructions between itself and its producer. The
reference pipeline program (`rtl/prog_pipeline.hex`) puts three no-op words
after the load phase for that reason. The later `add` → `or` pair is only two
apart, so the `or` reads the old `$t1`.

**Branches.** `beq` is resolved in M from EX/MEM `Branch` and `zero`, and the
PC is redirected at the end of that cycle. The three instructions fetched
after the `beq` have already entered the pipe and **complete normally**. In
effect there are three branch delay slots. In the reference program the
branch offset is 3, so a taken and a not-taken `beq` fetch the same next
word. `tb/prog_pipe_branch.hex` uses offset 5 to show the redirect.

Observation ports: `aluResult` and `zero` (E stage), `readData1` and
`readData2` (D stage), `dataMemOut`, `instructionIF_out` (F stage),
`writeRegister_out` and `writebackData_out` (W stage).

## Top level (`mips_top`)

The two cores stand side by side on a shared `clk` and `rst`, with `sc_` and
`pl_` prefixed outputs. `SC_PROGRAM` and `PL_PROGRAM` name the two program
files, and they default to the reference programs in `rtl/`. `rst` is
synchronous and active high. Hold it across at least one rising edge.

## Sizes and parameters

| parameter | default | notes |
|-----------|---------|-------|
| `IMEM_WORDS` | 256 | instruction ROM depth (the programs use ≤ 13 words) |
| `DMEM_ADDR_BITS` | 8 | 256 data words. The address is `aluResult[7:0]`, used directly as a word index. |
| `DMEM_READ_REG` | 1 | registered data-memory read (see above) |
| `PROGRAM` / `INIT_FILE` | `rtl/prog_*.hex` | Paths are relative to the directory the simulator runs in (the repository root). |

Program encodings (hex, one word per line): `20090112` addi $t1,$zero,0x112;
`200A000A` addi $t2,$zero,0xA; `200B000F` addi $t3,$zero,0xF; `112A0003` beq
$t1,$t2,+3; `012A4820` add $t1,$t1,$t2; `AD4B0064` sw $t3,100($t2); `012A4825`
or $t1,$t1,$t2.

## Departures and choices beyond the original design description

- A synchronous, active-high reset was added to the PC, the register file and
  the pipeline registers. The original description shows only a clock.
- Instruction memory contents come from `$readmemh` hex files rather than
  vendor memory-initialisation files. The PC is a byte address stepping by 4.
- Register file size (32 × 32, `$zero` hard-wired) and write timing (rising
  edge, no write-through) are standard choices. The description does not fix
  them.
- `lw` is decoded, but with the default registered data-memory read it writes
  back stale data. See *Data memory read timing*.
- The `mux4_select` rule (`Branch & zero`) and the sel=1→b convention of the
  2:1 mux are inferred from their role in the datapath.
- No overflow exceptions, no jumps, no shifts.

## Simulating

Every testbench is self-checking. Each prints one line
`TB_RESULT checks=N failures=M` and finishes. Run them from the repository root
so the hex paths resolve. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/mips_pkg.sv \
          tb/mips_top_tb.sv --top-module mips_top_tb -o sim && obj_dir/sim
```

| testbench | what it checks |
|-----------|----------------|
| `mips_top_tb` | Both cores end to end, on the reference programs and on branch-taken variants. It checks every cycle and counts each mechanism: branch taken and not taken in both cores, stores, pipeline write-back, stage overlap, the stale read caused by the missing forwarding. A mechanism that never occurs counts as a failure. |
| `mips_top_full_tb` | The top with all defaults, through the complete reference programs. |
| `mips_single_cycle_tb` | Per-cycle ALU results, register reads and store visibility. Covers beq taken, and a `lw`/`sub`/`and`/`slt` program on an asynchronous-read memory. |
| `mips_pipeline_tb` | Per-stage, per-cycle values for the reference program and for a taken branch with its three trailing instructions. |
| one per unit | Exhaustive or random checks against reference models written in the testbench. |
