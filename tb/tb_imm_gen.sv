// tb_imm_gen: self-checking test of the immediate unit. Random instruction
// words; each immediate format, including the 7-bit LEA shift field and the
// 32-bit constant appended from the upper 20 bits and a separate 12-bit
// field, is compared with a value assembled here bit by bit.
module tb_imm_gen;
  import fusion_pkg::*;

  logic [31:0] inst;
  logic [11:0] imm12;
  imm_sel_e    sel;
  logic [63:0] imm;
  int checks = 0, failures = 0;

  imm_gen dut (.*);

  function automatic logic [63:0] model(imm_sel_e s, logic [31:0] in, logic [11:0] lo);
    longint v;
    case (s)
      IMM_I:   v = longint'($signed(in)) >>> 20;
      IMM_S:   v = ((longint'($signed(in)) >>> 25) << 5) | longint'(in[11:7]);
      IMM_B:   v = ((longint'($signed(in)) >>> 31) << 12) | (longint'(in[7]) << 11) |
                   (longint'(in[30:25]) << 5) | (longint'(in[11:8]) << 1);
      IMM_U:   v = longint'($signed(in & 32'hFFFF_F000));
      IMM_J:   v = ((longint'($signed(in)) >>> 31) << 20) | (longint'(in[19:12]) << 12) |
                   (longint'(in[20]) << 11) | (longint'(in[30:21]) << 1);
      IMM_SH7: v = longint'(in >> 25);
      default: v = longint'($signed({in[31:12], lo}));
    endcase
    return 64'(v);
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      inst = $urandom; imm12 = 12'($urandom);
      sel = imm_sel_e'($urandom_range(0, 6));
      #1;
      checks++;
      if (imm !== model(sel, inst, imm12)) begin
        failures++;
        if (failures < 10) $display("FAIL: sel=%s inst=%h imm12=%h imm=%h exp=%h", sel.name(), inst, imm12, imm, model(sel, inst, imm12));
      end
    end
    // the paper's LUI+ADDI example value: upper 20 bits 0x12345, low 0xFFF
    inst = {20'h12345, 12'h0}; imm12 = 12'hFFF; sel = IMM_FUSED32; #1;
    checks++; if (imm !== 64'h0000_0000_1234_5FFF) failures++;
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
