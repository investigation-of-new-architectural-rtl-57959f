// tb_second_alu: self-checking test of the memory-stage second ALU: the
// bypass (no operation), the add of the rs2 register (LEA) and the right
// shift by the sign-extended immediate (clear upper word), against values
// computed here. Also runs the clear-upper-word idiom end to end on the
// result of a left shift.
module tb_second_alu;
  import fusion_pkg::*;

  alu2_op_e    op;
  logic        use_imm;
  logic [63:0] alu1_out, rs2, y;
  logic [31:0] mem_inst;
  int checks = 0, failures = 0;

  second_alu dut (.*);

  task automatic expect_y(input logic [63:0] e, input string what);
    #1;
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL: %s y=%h exp=%h", what, y, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [63:0] immx;
      alu1_out = {$urandom, $urandom};
      rs2      = {$urandom, $urandom};
      mem_inst = $urandom;
      immx     = {{52{mem_inst[31]}}, mem_inst[31:20]};
      op = ALU2_NONE; use_imm = 1'($urandom);
      expect_y(alu1_out, "bypass");
      op = ALU2_ADD; use_imm = 0;
      expect_y(alu1_out + rs2, "add rs2");
      op = ALU2_ADD; use_imm = 1;
      expect_y(alu1_out + immx, "add imm");
      op = ALU2_SRL; use_imm = 1;
      expect_y(alu1_out >> immx[5:0], "srl imm");
      op = ALU2_SRL; use_imm = 0;
      expect_y(alu1_out >> rs2[5:0], "srl rs2");
    end
    // clear upper word: (v << 32) from the first ALU, then >> 32 here
    for (int i = 0; i < 200; i++) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      alu1_out = v << 32; mem_inst = {12'd32, 20'h0}; op = ALU2_SRL; use_imm = 1;
      expect_y({32'b0, v[31:0]}, "clear upper word");
    end
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
