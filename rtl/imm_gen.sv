// imm_gen: the execute-stage immediate unit, extended for fused instructions.
//
// Combinational. For ordinary instructions it forms the sign-extended I, S, B,
// U or J immediate of the instruction word held in the execute-stage
// instruction register. Two selections serve the fused instructions:
//   IMM_SH7     - the 7-bit immediate in inst[31:25] of the fused R format
//                 (the LEA shift amount), zero-extended;
//   IMM_FUSED32 - for the LUI/AUIPC idioms, the upper 20 bits inst[31:12]
//                 appended with the 12 low bits imm12 taken from the second
//                 fetched word (held in the 12-bit execute-stage register);
//                 the 32-bit result is sign-extended to 64 bits.
// Appending rather than adding the two halves follows the design; it means a
// fused word carries the 32-bit constant itself, not the LUI/ADDI split.
module imm_gen
  import fusion_pkg::*;
(
  input  logic [31:0]     inst,
  input  logic [11:0]     imm12,
  input  imm_sel_e        sel,
  output logic [XLEN-1:0] imm
);

  logic [31:0] imm32;

  always_comb begin
    unique case (sel)
      IMM_I:       imm32 = {{20{inst[31]}}, inst[31:20]};
      IMM_S:       imm32 = {{20{inst[31]}}, inst[31:25], inst[11:7]};
      IMM_B:       imm32 = {{19{inst[31]}}, inst[31], inst[7], inst[30:25], inst[11:8], 1'b0};
      IMM_U:       imm32 = {inst[31:12], 12'b0};
      IMM_J:       imm32 = {{11{inst[31]}}, inst[31], inst[19:12], inst[20], inst[30:21], 1'b0};
      IMM_SH7:     imm32 = {25'b0, inst[31:25]};
      IMM_FUSED32: imm32 = {inst[31:12], imm12};
      default:     imm32 = '0;
    endcase
    imm = {{(XLEN-32){imm32[31]}}, imm32};
  end

endmodule
