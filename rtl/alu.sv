// alu: the first (execute-stage) ALU of the core.
//
// Combinational RV64I integer ALU: add, subtract, shifts, set-less-than,
// logic operations and a pass-through of operand b (used by LUI). With word=1
// it performs the RV64 "W" form: the operation on the low 32 bits and the
// result sign-extended from bit 31 (shift amounts then use 5 bits). The
// fused instructions use it unchanged: a left shift for LEA and clear upper
// word, an add for indexed load and the LUI/AUIPC idioms.
module alu
  import fusion_pkg::*;
(
  input  alu_op_e         op,
  input  logic            word,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);

  logic [5:0]      shamt;
  logic [XLEN-1:0] r;
  logic [31:0]     aw, srl_w, sra_w;
  logic [XLEN-1:0] sra_d;

  always_comb begin
    shamt = word ? {1'b0, b[4:0]} : b[5:0];
    aw    = a[31:0];
    srl_w = aw >> shamt;
    sra_w = $signed(aw) >>> shamt;
    sra_d = $signed(a) >>> shamt;
    unique case (op)
      ALU_ADD:   r = a + b;
      ALU_SUB:   r = a - b;
      ALU_SLL:   r = a << shamt;
      ALU_SLT:   r = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      ALU_SLTU:  r = {{(XLEN-1){1'b0}}, a < b};
      ALU_XOR:   r = a ^ b;
      ALU_SRL:   r = word ? {32'b0, srl_w} : a >> shamt;
      ALU_SRA:   r = word ? {32'b0, sra_w} : sra_d;
      ALU_OR:    r = a | b;
      ALU_AND:   r = a & b;
      ALU_COPY2: r = b;
      default:   r = '0;
    endcase
    y = word ? {{32{r[31]}}, r[31:0]} : r;
  end

endmodule
