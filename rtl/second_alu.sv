// second_alu: the memory-stage second ALU with its operand mux, sign
// extension unit and bypass mux.
//
// Combinational. The design adds this unit to the memory stage so that the
// second operation of a fused pair runs in parallel with the data-memory
// access, off the execute-stage critical path:
//   * sign extension unit - sign-extends imm[11:0] of the memory-stage
//     instruction register (mem_inst[31:20]);
//   * operand mux         - picks the second operand: the memory-stage rs2
//     register (LEA) or the sign-extended immediate (clear upper word);
//   * second ALU          - ADD (LEA) or logical right shift (clear upper
//     word) of the first-ALU result;
//   * bypass mux          - passes the first-ALU result through unchanged
//     when the instruction needs no second operation.
// Which operations the second ALU supports (add and shift right only) is this
// design's choice: they are the two the fused idioms need.
module second_alu
  import fusion_pkg::*;
(
  input  alu2_op_e        op,
  input  logic            use_imm,   // operand mux select
  input  logic [XLEN-1:0] alu1_out,  // mem_reg_wdata: first-ALU result
  input  logic [XLEN-1:0] rs2,       // mem_reg_rs2
  input  logic [31:0]     mem_inst,  // mem_reg_inst
  output logic [XLEN-1:0] y
);

  logic [XLEN-1:0] imm_sext, opnd, r;

  assign imm_sext = {{(XLEN-12){mem_inst[31]}}, mem_inst[31:20]};
  assign opnd     = use_imm ? imm_sext : rs2;

  always_comb begin
    unique case (op)
      ALU2_ADD: r = alu1_out + opnd;
      ALU2_SRL: r = alu1_out >> opnd[5:0];
      default:  r = alu1_out;
    endcase
  end

  assign y = (op == ALU2_NONE) ? alu1_out : r;

endmodule
