# A five-stage RV64IM core with fused instructions

Compiled RISC-V code is full of two-instruction idioms in which the second
instruction only finishes what the first started. Examples are a shift
followed by an add to form an array address, or a `lui` followed by an `addi`
to build a 32-bit constant. This core gives five such idioms an instruction of
their own. Each pair then takes one issue slot instead of two, so a program
rewritten with the fused forms executes fewer instructions. On a single-issue
pipeline it also takes fewer cycles.

The hardware cost is kept off the critical path:

- The second operation of a pair runs in a **second ALU placed in the memory
  stage**. It works in parallel with the data-memory access, so it does not
  lengthen the execute stage.
- The 32-bit-constant idioms are encoded as **8-byte instructions**. The fetch
  stage reads two words per cycle and steps the PC by 8.
- The **immediate unit** joins the two 12/20-bit halves into a single 32-bit
  constant.

The base pipeline follows the organisation of Berkeley's Rocket core:

- five in-order stages, F, D, X, M, W;
- the RV64IM instruction set;
- one instruction per cycle when nothing stalls.

The caches are replaced by single-cycle memories. The core has no CSR file,
no FPU, no coprocessor port and no virtual memory, so it is a bare integer
core meant for studying the fusion mechanism.

## The five fused instructions

| Fused instruction | Replaces | Execute stage (ALU 1) | Memory stage |
|---|---|---|---|
| `LEA rd, rs1, rs2, sh` (load effective address) | `slli rd, rs1, sh` ; `add rd, rd, rs2` | `rs1 << sh` | second ALU: `+ rs2` |
| `IDXLD.w rd, rs1, rs2` (indexed load) | `add rd, rs1, rs2` ; `l? rd, 0(rd)` | `rs1 + rs2` | load from that address |
| `CUW rd, rs1, sh` (clear upper word) | `slli rd, rs1, 32` ; `srli rd, rd, 32` | `rs1 << sh` | second ALU: `>> sh` (logical) |
| `LUI.F rd, C` + second word | `lui rd, hi` ; `addi rd, rd, lo` or `l? rd, lo(rd)` | `0 + C` | result, or load from it |
| `AUIPC.F rd, C` + second word | `auipc rd, hi` ; `addi`/`l?` | `PC + C` | result, or load from it |

A fused instruction writes only its final destination. The intermediate value
of the pair is never written to a register. This matches the usual case,
where both instructions of the idiom name the same `rd`.

### Encodings

The fused instructions reuse the RISC-V R, I and U layouts, so register
fields stay where every decoder expects them. Only the opcodes are new. They
are the three opcodes RISC-V reserves for custom extensions.

```
31      25 24  20 19  15 14 12 11  7 6       0
0 sh[5:0]   rs2    rs1    000    rd   0001011    LEA     rd = (rs1 << sh) + rs2
0000 w[2:0] rs2    rs1    001    rd   0001011    IDXLD   rd = load_w(rs1 + rs2)
000000 sh[5:0]     rs1    010    rd   0001011    CUW     rd = (rs1 << sh) >> sh
C[31:12]                         rd   0101011    LUI.F   } followed by a second word,
C[31:12]                         rd   1011011    AUIPC.F } see below
```

- `w` in IDXLD is a load funct3: LB, LH, LW, LD, LBU, LHU or LWU.
- `sh` = 32 in CUW gives the clear-upper-word idiom. Other amounts give the
  general "keep the low 64-sh bits" operation.
- `LEA` takes any shift from 0 to 63. The idiom itself uses 1 to 3.

The LUI/AUIPC forms are 8 bytes long. The second word is an ordinary `addi`
(funct3 000) or load (`lb`…`ld`, `lbu`…`lwu`) word. The decoder uses three
parts of it:

- its opcode, which chooses between "add" and "load";
- its funct3, which gives the load width;
- its `imm[11:0]`, which is the low 12 bits of the constant.

Its `rd` and `rs1` fields are ignored. Writing them as the original pair would
(`addi rd, rd, lo`) keeps disassembly readable.

**The constant is appended, not added.** The 32-bit constant is
`C = {word0[31:12], word1[31:20]}`, sign-extended from bit 31 to 64 bits. A
`lui`/`addi` pair adds a sign-extended 12-bit value to `hi << 12`, so
compilers round `hi` up when bit 11 of the constant is set. The fused form
needs no such correction. To put `0x1234_5FFF` in a register, encode
`hi = 0x12345` and `lo = 0xFFF`. The unfused pair would need `hi = 0x12346`.
This matters to anyone writing a tool that rewrites pairs into fused form.

Everything else decodes as RV64IM:

- FENCE and FENCE.I are no-ops.
- ECALL and EBREAK stop the core.
- CSR instructions, unused fused encodings, and an 8-byte fused instruction
  whose second word is not an `addi` or a load are unsupported. They stop the
  core with `illegal` set.

## Pipeline and timing

```
  F                D                 X                      M                         W
  PC, two words -> decode, regfile -> bypass, IMM, ALU,  -> DMEM access            -> regfile write
  PC += 4 or 8     read              MUL/DIV, branch        second ALU (LEA, CUW)
                   ex_imm12 <- word1 resolution             result mux
```

**Fetch** (`fetch_unit`, `imem`). The instruction memory returns the words at
`PC` and `PC+4` in the same cycle. If the first word carries a LUI.F/AUIPC.F
opcode, the pair moves into the decode register together and the PC advances
by 8. Otherwise only the first word counts and the PC advances by 4. An 8-byte
instruction therefore costs one fetch cycle, like any other.

**Decode** (`fused_decoder`, `regfile`).

- It reads `rs1`/`rs2` and builds the control word, including the fused
  control signals:
  - the second-ALU operation and its operand source;
  - the 32-bit-immediate select;
  - the two-word flag.
- The low 12 bits of the second word go into a 12-bit execute-stage register
  (`ex_imm12`). Only these 12 bits travel down the pipe, not a second 32-bit
  instruction register.
- The register file is write-first, so a value written back in this cycle is
  read correctly.

**Execute** (`imm_gen`, `alu`, `muldiv`).

- The immediate unit produces the RISC-V immediates. For fused instructions it
  also produces the LEA shift amount (`inst[31:25]`) and the appended 32-bit
  constant `{inst[31:12], ex_imm12}`.
- The first ALU does the first half of every fused instruction: the shift for
  LEA and CUW, the add for IDXLD and the LUI/AUIPC forms.
- Branches and jumps resolve here:
  - a taken one redirects fetch and squashes the two younger instructions;
  - prediction is static not-taken, so a taken branch costs two bubbles.
- MUL/DIV is iterative, one bit per cycle, and holds the execute stage.
  Its result arrives XLEN+1 = 65 cycles after the request.

**Memory** (`dmem`, `second_alu`).

- The first-ALU result (`mem_wdata`) is the data address.
- At the same time the second ALU combines it with either:
  - the forwarded-and-latched `rs2` (`mem_rs2`) for LEA; or
  - the sign-extended immediate of the memory-stage instruction register
    (`mem_inst[31:20]`) for CUW.
- When no fused operation is active, the second ALU's output mux is a plain
  bypass of the first-ALU result.
- The stage result is the load data for loads, and the second-ALU output for
  everything else.

**Write-back.** The result is written to the register file and reported on the
retire trace.

### Hazards

| Situation | Handling | Cost |
|---|---|---|
| Operand produced by the instruction in M or W | forwarded into X (`ex_rs1_val`/`ex_rs2_val` bypass muxes) | none |
| Operand produced by the instruction in X, and that result is only ready at the end of M (load, IDXLD, LUI.F/AUIPC.F with load, LEA, CUW) | decode interlock | 1 bubble |
| Taken branch, JAL, JALR | redirect from X | 2 bubbles |
| MUL/DIV | execute stage held until the unit answers | 65 cycles |

The second ALU's results are ready at the same point as load data. A fused LEA
or CUW therefore has the same one-cycle use penalty as a load. An assertion in
`fusion_core` checks that no operand is ever forwarded from the memory stage
before it is ready. A second assertion checks that fetch and decode agree on
the length of every instruction.

Fusing a pair saves exactly one issue slot. It also adds an interlock bubble
where the fused instruction's consumer follows immediately and the unfused
second half would not have stalled. The end-to-end test checks this identity:
cycles saved = instructions saved − extra interlock bubbles.

### Halting and counters

- The core runs from reset at `RESET_PC` (default 0).
- Fetch stops once ECALL, EBREAK or an unsupported instruction reaches the
  execute stage.
- `halted` rises when that instruction retires. `illegal` also rises if the
  instruction was unsupported.
- `perf` (a `perf_t` struct) counts, up to the halt:
  - cycles;
  - retired instructions (a fused one counts once);
  - retired fused and 8-byte fused instructions;
  - interlock bubbles;
  - MUL/DIV stall cycles;
  - redirects;
  - operands bypassed from M and from W.

## Top level: `fusion_soc`

`fusion_soc` is the core plus its two memories:

- `imem`: 4096 words = 16 KiB, two words per cycle.
- `dmem`: 2048 doublewords = 16 KiB, byte-addressed, loads read in the same
  cycle, stores written at the clock edge, accesses naturally aligned.

Addresses wrap modulo the memory size. The top's ports are:

| Ports | Purpose |
|---|---|
| `prog_we`, `prog_index`, `prog_data` | write program words while `rst_n` is low |
| `host_we`, `host_index`, `host_wdata`, `host_rdata` | a doubleword host port on the data memory, to preload inputs and read results |
| `retire_*` | one entry per retiring instruction: PC, first word, destination and value |
| `halted`, `illegal`, `perf` | status and counters |

Parameters: `IMEM_WORDS`, `DMEM_DWORDS`, `RESET_PC`.

## Files

| File | Contents |
|---|---|
| `rtl/fusion_pkg.sv` | XLEN, opcodes, control-word and counter structs, enums |
| `rtl/fusion_soc.sv` | top: core + memories |
| `rtl/fusion_core.sv` | the pipeline: stage registers, hazards, forwarding, result muxes, counters |
| `rtl/fetch_unit.sv` | PC, decode register, 4/8-byte step |
| `rtl/fused_decoder.sv` | RV64IM + fused decode to `ctrl_t` |
| `rtl/imm_gen.sv` | immediate unit with the appended 32-bit form |
| `rtl/alu.sv` | first ALU (RV64I operations, word forms) |
| `rtl/second_alu.sv` | memory-stage ALU with operand mux, sign extension, bypass |
| `rtl/regfile.sv` | 32 × 64 register file, 2R/1W, write-first |
| `rtl/muldiv.sv` | iterative RV64M unit |
| `rtl/imem.sv`, `rtl/dmem.sv` | memories |
| `tb/tb_rv_pkg.sv` | instruction encoders and an instruction-level reference model of the ISA, fused instructions included |
| `tb/tb_<block>.sv` | one self-checking testbench per RTL module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog.

- **`tb_fusion_core`** runs the core against the reference model in
  `tb_rv_pkg`. It compares every retired instruction (PC, destination, value)
  and the final data memory. The programs are:
  - a directed program using every fused form, MUL/DIV and a loop;
  - twelve random 300-slot programs mixing RV64IM and fused instructions,
    short forward branches and back-to-back dependences.

  It also checks the base timing: 20 independent instructions plus ECALL take
  25 cycles. Every pipeline mechanism must occur.
- **`tb_fusion_soc`** uses the top at its default sizes. It runs a small array
  kernel twice: written with the ordinary pairs, and written with the fused
  instructions. The kernel uses all five idioms (IDXLD, CUW and LEA inside a
  64-iteration loop, the LUI/AUIPC forms outside it). The test checks:
  - the results of both versions;
  - that exactly 198 fused instructions retire;
  - that the instructions saved equal the fused count;
  - the cycle identity above;
  - a 65-cycle multiply stall, 63 redirects, and both bypass paths.

  Measured: **724 → 526 instructions (−27%), 985 → 787 cycles (−20%)**.
- **Unit testbenches** cover the rest:
  - ALU, second ALU and immediate unit against expressions computed in the
    test;
  - decoder field by field;
  - fetch stepping under random stalls and redirects;
  - register file against a model;
  - MUL/DIV against the reference model, including the 65-cycle latency;
  - both memories.

### Simulating with plain Verilator

Verilator 5 with `--timing` is needed. The package files go first:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fusion_pkg.sv tb/tb_rv_pkg.sv rtl/*.sv tb/tb_fusion_soc.sv \
    --top-module tb_fusion_soc -o sim
./obj_dir/sim
```

Use the same command for any other testbench, with its name in both places.
Two-state simulation is assumed. Every register that is read is reset.

### Writing programs

Use the encoder functions in `tb/tb_rv_pkg.sv`. For example:

- `LEA(rd, rs1, rs2, sh)`, `IDXLD(rd, rs1, rs2, f3)`, `CUW(rd, rs1, sh)`;
- `FUSED_HI(auipc, rd, C)` followed by `FUSED_LO(load, f3, rd, C)`.

Load the words through `prog_*`, release reset and wait for `halted`. The
reference model `rv_ref` executes the same words at the instruction level, so
it can serve as a golden model for new tests.

## Relation to the published proposal

This RTL implements a proposal to add fused instructions to a Rocket-class
five-stage core. It follows that proposal in these points:

- the choice of the five idioms;
- the second ALU in the memory stage, with its operand mux, sign extension
  and bypass;
- the 12-bit execute-stage register;
- the immediate unit that appends the low 12 bits;
- fused control signals decoded from the opcode;
- the PC step of 8 for the two-word idioms;
- how each instruction flows through the stages.

These parts are this design's own choices:

- **Encodings.** The proposal gives only the R/I/U-style formats with a
  "fused opcode". The custom-0/1/2 opcodes, the funct3 assignment, the
  IDXLD width field and the way the second word selects add/load are chosen
  here.
- **Fetch.** The proposal has a fused signal ask the cache for two words in
  the *next* cycle. Here the memory always delivers two words and the length
  is decided from the first word's opcode in the same cycle.
- **Hazard handling.** The proposal does not describe forwarding,
  interlocks, branch resolution or MUL/DIV latency. Those choices are listed
  above.
- **Memories.** Caches, the branch predictor, TLBs, CSR file, FPU and RoCC
  port of the full Rocket core are not modelled. The memories are 16 KiB
  single-cycle arrays.
- **Wider use of the idioms.** IDXLD and the LUI/AUIPC load forms accept
  every load width, not only `ld`. LEA and CUW accept any shift amount.
  AUIPC+JALR is not fused, as in the proposal.

The proposal reports 4.4% (Dhrystone) and 6.1% (CoreMark) fewer executed
instructions, and 3.8% / 5.4% shorter execution time, on full benchmarks.
Those benchmarks are not run here. They need a CSR-based timing harness and
more runtime support than this bare core has. The kernel above exercises the
idioms far more densely than the benchmarks do, which is why its reduction is
much larger.
