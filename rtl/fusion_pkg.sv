// fusion_pkg: types and constants shared by the fused-instruction RV64IM core.
//
// The core is a five-stage in-order RV64IM pipeline (fetch, decode, execute,
// memory, write-back) extended with five fused-instruction idioms: load
// effective address (LEA), indexed load, clear upper word, LUI-based idioms
// (LUI+ADDI, LUI+load) and AUIPC-based idioms (AUIPC+ADDI, AUIPC+load).
//
// Fused encodings (this design's choice; the fused formats follow the RISC-V
// R-, I- and U-type layouts, only the opcode values are chosen here):
//   custom-0 (0001011), R/I formats, funct3 selects the idiom
//     funct3 000  LEA      rd = (rs1 << inst[30:25]) + rs2        (R format)
//     funct3 001  IDXLD    rd = load(rs1 + rs2), width = inst[27:25] as a
//                          load funct3 (LB..LWU, LD)                (R format)
//     funct3 010  CUW      rd = (rs1 << imm[5:0]) >> imm[5:0]       (I format)
//   custom-1 (0101011)  LUI-fused,   U format, 8 bytes long
//   custom-2 (1011011)  AUIPC-fused, U format, 8 bytes long
//     The second word is an ordinary ADDI or load word: its imm[11:0] is the
//     low immediate and its opcode/funct3 choose "add" or "load (width)".
//     The 32-bit constant is {inst[31:12], second[31:20]}, sign-extended from
//     bit 31; LUI-fused adds it to x0, AUIPC-fused adds it to the PC.
package fusion_pkg;

  localparam int XLEN = 64;

  // Base opcodes
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_IMM32  = 7'b0011011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_REG32  = 7'b0111011;
  localparam logic [6:0] OP_FENCE  = 7'b0001111;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;
  // Fused opcodes
  localparam logic [6:0] OP_FUSED_RI    = 7'b0001011;
  localparam logic [6:0] OP_FUSED_LUI   = 7'b0101011;
  localparam logic [6:0] OP_FUSED_AUIPC = 7'b1011011;

  localparam logic [2:0] F3_LEA   = 3'b000;
  localparam logic [2:0] F3_IDXLD = 3'b001;
  localparam logic [2:0] F3_CUW   = 3'b010;

  // First-ALU operations
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_COPY2
  } alu_op_e;

  // Immediate formats produced by the immediate unit
  typedef enum logic [2:0] {
    IMM_I, IMM_S, IMM_B, IMM_U, IMM_J, IMM_SH7, IMM_FUSED32
  } imm_sel_e;

  typedef enum logic [1:0] { A1_RS1, A1_PC, A1_ZERO } op1_sel_e;
  typedef enum logic [1:0] { A2_RS2, A2_IMM, A2_FOUR } op2_sel_e;

  // Fused operation carried to the memory stage
  typedef enum logic [2:0] {
    FUSE_NONE, FUSE_LEA, FUSE_IDXLD, FUSE_CUW, FUSE_LUI, FUSE_AUIPC
  } fuse_e;

  // Second-ALU operations (memory stage)
  typedef enum logic [1:0] { ALU2_NONE, ALU2_ADD, ALU2_SRL } alu2_op_e;

  // Multiply/divide operations (funct3 of OP/OP-32 with funct7 = 1)
  typedef enum logic [2:0] {
    MD_MUL, MD_MULH, MD_MULHSU, MD_MULHU, MD_DIV, MD_DIVU, MD_REM, MD_REMU
  } md_op_e;

  // Decoded control word
  typedef struct packed {
    logic      legal;
    logic      fused;        // any fused instruction
    logic      fetch2;       // 8-byte fused instruction (LUI/AUIPC idioms)
    fuse_e     fuse;
    logic      rs1_used;
    logic      rs2_used;
    logic      wen;          // writes rd
    op1_sel_e  op1;
    op2_sel_e  op2;
    imm_sel_e  imm;
    alu_op_e   alu_op;
    logic      word;         // 32-bit (W) operation
    logic      branch;
    logic      jal;
    logic      jalr;
    logic      load;
    logic      store;
    logic [2:0] mem_size;    // load/store funct3
    logic      muldiv;
    md_op_e    md_op;
    alu2_op_e  alu2_op;      // second ALU operation in the memory stage
    logic      alu2_imm;     // second ALU operand from the sign-extended immediate
    logic      halt;         // ECALL / EBREAK
  } ctrl_t;

  // Event counters of the core (cycle and retired-instruction counts as used
  // to measure execution time and effective instruction count, plus counts
  // of the pipeline mechanisms).
  typedef struct packed {
    logic [63:0] cycles;       // cycles from reset until the halt retires
    logic [63:0] instret;      // retired instructions (a fused one counts once)
    logic [63:0] fused;        // retired fused instructions
    logic [63:0] fetch2;       // retired 8-byte fused instructions
    logic [63:0] load_use;     // decode-stage interlock bubbles
    logic [63:0] md_stall;     // cycles the execute stage waited for MUL/DIV
    logic [63:0] redirect;     // taken branches and jumps
    logic [63:0] bypass_mem;   // operands taken from the memory stage
    logic [63:0] bypass_wb;    // operands taken from the write-back stage
  } perf_t;

endpackage
