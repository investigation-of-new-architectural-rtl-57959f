// fused_decoder: instruction decoder of the core, including the fused-control
// signals.
//
// Purely combinational. It decodes one RV64IM instruction word, or one fused
// instruction, into the control word ctrl_t (see fusion_pkg). Following the
// design's approach, fused control is produced by comparing the instruction's
// opcode with the fused opcodes; the ordinary RV64IM decode is unchanged.
// For the 8-byte LUI/AUIPC idioms the decoder also looks at the second fetched
// word (inst2): its opcode says whether the idiom ends in an ADDI or a load,
// and its funct3 gives the load width.
//
// Interface: inst, inst2 in; ctrl out. Unsupported words (CSR instructions,
// FENCE.I is accepted as a no-op like FENCE) give ctrl.legal = 0.
module fused_decoder
  import fusion_pkg::*;
(
  input  logic [31:0] inst,
  input  logic [31:0] inst2,
  output ctrl_t       ctrl
);

  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  assign opcode = inst[6:0];
  assign funct3 = inst[14:12];
  assign funct7 = inst[31:25];

  // Maps funct3 of OP / OP-IMM to the first-ALU operation.
  function automatic alu_op_e f3_alu(input logic [2:0] f3, input logic alt);
    unique case (f3)
      3'b000:  return alt ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl          = '0;
    ctrl.fuse     = FUSE_NONE;
    ctrl.op1      = A1_RS1;
    ctrl.op2      = A2_RS2;
    ctrl.imm      = IMM_I;
    ctrl.alu_op   = ALU_ADD;
    ctrl.md_op    = MD_MUL;
    ctrl.alu2_op  = ALU2_NONE;
    ctrl.mem_size = funct3;

    unique case (opcode)
      OP_LUI: begin
        ctrl.legal = 1'b1; ctrl.wen = 1'b1;
        ctrl.op1 = A1_ZERO; ctrl.op2 = A2_IMM; ctrl.imm = IMM_U;
      end
      OP_AUIPC: begin
        ctrl.legal = 1'b1; ctrl.wen = 1'b1;
        ctrl.op1 = A1_PC; ctrl.op2 = A2_IMM; ctrl.imm = IMM_U;
      end
      OP_JAL: begin
        ctrl.legal = 1'b1; ctrl.wen = 1'b1; ctrl.jal = 1'b1;
        ctrl.op1 = A1_PC; ctrl.op2 = A2_FOUR; ctrl.imm = IMM_J;
      end
      OP_JALR: begin
        ctrl.legal = (funct3 == 3'b000); ctrl.wen = 1'b1; ctrl.jalr = 1'b1;
        ctrl.rs1_used = 1'b1;
        ctrl.op1 = A1_PC; ctrl.op2 = A2_FOUR; ctrl.imm = IMM_I;
      end
      OP_BRANCH: begin
        ctrl.legal = (funct3 != 3'b010) && (funct3 != 3'b011);
        ctrl.branch = 1'b1; ctrl.rs1_used = 1'b1; ctrl.rs2_used = 1'b1;
        ctrl.imm = IMM_B;
      end
      OP_LOAD: begin
        ctrl.legal = (funct3 != 3'b111); ctrl.wen = 1'b1; ctrl.load = 1'b1;
        ctrl.rs1_used = 1'b1; ctrl.op2 = A2_IMM; ctrl.imm = IMM_I;
      end
      OP_STORE: begin
        ctrl.legal = (funct3[2] == 1'b0); ctrl.store = 1'b1;
        ctrl.rs1_used = 1'b1; ctrl.rs2_used = 1'b1;
        ctrl.op2 = A2_IMM; ctrl.imm = IMM_S;
      end
      OP_IMM: begin
        ctrl.wen = 1'b1; ctrl.rs1_used = 1'b1; ctrl.op2 = A2_IMM; ctrl.imm = IMM_I;
        ctrl.alu_op = f3_alu(funct3, funct3 == 3'b101 && inst[30]);
        if (funct3 == 3'b001)      ctrl.legal = (inst[31:26] == 6'b000000);
        else if (funct3 == 3'b101) ctrl.legal = (inst[31:26] == 6'b000000) ||
                                                (inst[31:26] == 6'b010000);
        else                       ctrl.legal = 1'b1;
      end
      OP_IMM32: begin
        ctrl.wen = 1'b1; ctrl.rs1_used = 1'b1; ctrl.op2 = A2_IMM; ctrl.imm = IMM_I;
        ctrl.word = 1'b1;
        ctrl.alu_op = f3_alu(funct3, funct3 == 3'b101 && inst[30]);
        unique case (funct3)
          3'b000:  ctrl.legal = 1'b1;
          3'b001:  ctrl.legal = (funct7 == 7'b0000000);
          3'b101:  ctrl.legal = (funct7 == 7'b0000000) || (funct7 == 7'b0100000);
          default: ctrl.legal = 1'b0;
        endcase
      end
      OP_REG, OP_REG32: begin
        ctrl.wen = 1'b1; ctrl.rs1_used = 1'b1; ctrl.rs2_used = 1'b1;
        ctrl.word = (opcode == OP_REG32);
        if (funct7 == 7'b0000001) begin
          ctrl.muldiv = 1'b1;
          ctrl.md_op  = md_op_e'(funct3);
          // Only MULW and the four divide/remainder ops have W forms.
          ctrl.legal  = (opcode == OP_REG) || (funct3 == 3'b000) || funct3[2];
        end else begin
          ctrl.alu_op = f3_alu(funct3, inst[30]);
          if (opcode == OP_REG)
            ctrl.legal = (funct7 == 7'b0000000) ||
                         (funct7 == 7'b0100000 && (funct3 == 3'b000 || funct3 == 3'b101));
          else
            ctrl.legal = ((funct7 == 7'b0000000) &&
                          (funct3 == 3'b000 || funct3 == 3'b001 || funct3 == 3'b101)) ||
                         ((funct7 == 7'b0100000) && (funct3 == 3'b000 || funct3 == 3'b101));
        end
      end
      OP_FENCE: begin
        ctrl.legal = 1'b1;
      end
      OP_SYSTEM: begin
        // ECALL and EBREAK stop the core; CSR instructions are not supported.
        ctrl.legal = (inst[31:21] == 11'b0) && (inst[19:7] == 13'b0);
        ctrl.halt  = ctrl.legal;
      end
      // ---------------- fused instructions ----------------
      OP_FUSED_RI: begin
        ctrl.fused = 1'b1; ctrl.wen = 1'b1; ctrl.rs1_used = 1'b1;
        unique case (funct3)
          F3_LEA: begin
            // ALU1: rs1 << shamt ; ALU2: + rs2 (from the memory-stage register)
            ctrl.legal = (inst[31] == 1'b0);
            ctrl.fuse = FUSE_LEA; ctrl.rs2_used = 1'b1;
            ctrl.op2 = A2_IMM; ctrl.imm = IMM_SH7; ctrl.alu_op = ALU_SLL;
            ctrl.alu2_op = ALU2_ADD;
          end
          F3_IDXLD: begin
            // ALU1: rs1 + rs2 as the load address
            ctrl.legal = (inst[31:28] == 4'b0000) && (inst[27:25] != 3'b111);
            ctrl.fuse = FUSE_IDXLD; ctrl.rs2_used = 1'b1; ctrl.load = 1'b1;
            ctrl.mem_size = inst[27:25];
          end
          F3_CUW: begin
            // ALU1: rs1 << imm ; ALU2: >> imm (sign-extended immediate operand)
            ctrl.legal = (inst[31:26] == 6'b000000);
            ctrl.fuse = FUSE_CUW; ctrl.op2 = A2_IMM; ctrl.imm = IMM_I;
            ctrl.alu_op = ALU_SLL; ctrl.alu2_op = ALU2_SRL; ctrl.alu2_imm = 1'b1;
          end
          default: ctrl.legal = 1'b0;
        endcase
      end
      OP_FUSED_LUI, OP_FUSED_AUIPC: begin
        ctrl.fused = 1'b1; ctrl.fetch2 = 1'b1; ctrl.wen = 1'b1;
        ctrl.fuse  = (opcode == OP_FUSED_LUI) ? FUSE_LUI : FUSE_AUIPC;
        ctrl.op1   = (opcode == OP_FUSED_LUI) ? A1_ZERO : A1_PC;
        ctrl.op2   = A2_IMM; ctrl.imm = IMM_FUSED32;
        if (inst2[6:0] == OP_IMM && inst2[14:12] == 3'b000) begin
          ctrl.legal = 1'b1;
        end else if (inst2[6:0] == OP_LOAD && inst2[14:12] != 3'b111) begin
          ctrl.legal = 1'b1; ctrl.load = 1'b1; ctrl.mem_size = inst2[14:12];
        end
      end
      default: ctrl.legal = 1'b0;
    endcase
  end

endmodule
