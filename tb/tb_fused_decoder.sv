// tb_fused_decoder: self-checking test of the decoder. Each fused instruction
// must raise the fused control signals that route it through the datapath
// (first-ALU operation and operands, immediate format, second-ALU operation
// and operand, load and width, two-word fetch); ordinary instructions must
// decode as before and never look fused; unsupported words must be illegal.
module tb_fused_decoder;
  import fusion_pkg::*;
  import tb_rv_pkg::*;

  logic [31:0] inst, inst2;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  fused_decoder dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (inst %h inst2 %h)", what, inst, inst2);
    end
  endtask

  task automatic apply(input logic [31:0] i1, input logic [31:0] i2 = ADDI(0, 0, 0));
    inst = i1; inst2 = i2; #1;
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      int rd, rs1, rs2, sh;
      logic [2:0] w;
      logic [31:0] c;
      rd = $urandom_range(1, 31); rs1 = $urandom_range(0, 31); rs2 = $urandom_range(0, 31);
      sh = $urandom_range(0, 63);
      c  = $urandom;
      do w = 3'($urandom); while (w == 3'd7);

      apply(LEA(rd, rs1, rs2, sh));
      chk(ctrl.legal && ctrl.fused && !ctrl.fetch2 && ctrl.fuse == FUSE_LEA, "LEA fused");
      chk(ctrl.alu_op == ALU_SLL && ctrl.op1 == A1_RS1 && ctrl.op2 == A2_IMM && ctrl.imm == IMM_SH7, "LEA ALU1");
      chk(ctrl.alu2_op == ALU2_ADD && !ctrl.alu2_imm && ctrl.rs1_used && ctrl.rs2_used && ctrl.wen && !ctrl.load, "LEA ALU2");

      apply(IDXLD(rd, rs1, rs2, w));
      chk(ctrl.legal && ctrl.fused && ctrl.fuse == FUSE_IDXLD && ctrl.load && ctrl.mem_size == w, "IDXLD load");
      chk(ctrl.alu_op == ALU_ADD && ctrl.op1 == A1_RS1 && ctrl.op2 == A2_RS2 && ctrl.alu2_op == ALU2_NONE, "IDXLD ALU");

      apply(CUW(rd, rs1, sh));
      chk(ctrl.legal && ctrl.fused && ctrl.fuse == FUSE_CUW && !ctrl.rs2_used, "CUW fused");
      chk(ctrl.alu_op == ALU_SLL && ctrl.op2 == A2_IMM && ctrl.imm == IMM_I, "CUW ALU1");
      chk(ctrl.alu2_op == ALU2_SRL && ctrl.alu2_imm, "CUW ALU2");

      for (int au = 0; au < 2; au++) begin
        apply(FUSED_HI(au, rd, c), FUSED_LO(0, 0, rd, c));
        chk(ctrl.legal && ctrl.fused && ctrl.fetch2 && !ctrl.load && ctrl.wen, "U+ADDI");
        chk(ctrl.imm == IMM_FUSED32 && ctrl.op2 == A2_IMM && ctrl.alu_op == ALU_ADD, "U+ADDI imm");
        chk(ctrl.op1 == (au ? A1_PC : A1_ZERO) && ctrl.fuse == (au ? FUSE_AUIPC : FUSE_LUI), "U+ADDI op1");
        chk(!ctrl.rs1_used && !ctrl.rs2_used, "U+ADDI no register sources");
        apply(FUSED_HI(au, rd, c), FUSED_LO(1, w, rd, c));
        chk(ctrl.legal && ctrl.fetch2 && ctrl.load && ctrl.mem_size == w, "U+load");
        apply(FUSED_HI(au, rd, c), ADD(rd, rd, rd));
        chk(!ctrl.legal, "U+ unsupported second word");
      end

      // ordinary instructions
      apply(ADD(rd, rs1, rs2));
      chk(ctrl.legal && !ctrl.fused && ctrl.alu_op == ALU_ADD && ctrl.alu2_op == ALU2_NONE && !ctrl.fetch2, "ADD");
      apply(SLLI(rd, rs1, sh));
      chk(ctrl.legal && !ctrl.fused && ctrl.alu_op == ALU_SLL && ctrl.imm == IMM_I, "SLLI");
      apply(LOAD(w, rd, rs1, 8));
      chk(ctrl.legal && ctrl.load && ctrl.mem_size == w && !ctrl.fused, "LOAD");
      apply(STORE(3'(w[1:0]), rs2, rs1, 8));
      chk(ctrl.legal && ctrl.store && !ctrl.wen && ctrl.imm == IMM_S, "STORE");
      apply(BRANCH(3'd1, rs1, rs2, 16));
      chk(ctrl.legal && ctrl.branch && !ctrl.wen && ctrl.imm == IMM_B, "BNE");
      apply(JAL(rd, 64));
      chk(ctrl.legal && ctrl.jal && ctrl.wen && ctrl.op1 == A1_PC && ctrl.op2 == A2_FOUR, "JAL");
      apply(LUI(rd, 20'(c)));
      chk(ctrl.legal && ctrl.op1 == A1_ZERO && ctrl.imm == IMM_U && !ctrl.fetch2, "LUI");
      apply(AUIPC(rd, 20'(c)));
      chk(ctrl.legal && ctrl.op1 == A1_PC && ctrl.imm == IMM_U && !ctrl.fetch2, "AUIPC");
      apply(MULDIV(w, 0, rd, rs1, rs2));
      chk(ctrl.legal && ctrl.muldiv && ctrl.md_op == md_op_e'(w), "MUL/DIV");
      apply(MULDIV(3'd1, 1, rd, rs1, rs2));
      chk(!ctrl.legal, "MULHW does not exist");
    end
    apply(ECALL());
    chk(ctrl.legal && ctrl.halt, "ECALL halts");
    apply(32'h3000_2073);   // csrr
    chk(!ctrl.legal, "CSR access unsupported");
    apply(32'h0000_300B);   // custom-0 funct3 011: unused
    chk(!ctrl.legal, "unused fused funct3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
