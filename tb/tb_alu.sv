// tb_alu: self-checking test of the first ALU. Random operands (with edge
// values mixed in) for every operation, 64-bit and word forms, compared with
// results computed here from the RISC-V definitions.
module tb_alu;
  import fusion_pkg::*;

  alu_op_e     op;
  logic        word;
  logic [63:0] a, b, y;
  int checks = 0, failures = 0;

  alu dut (.*);

  function automatic logic [63:0] sx(logic [31:0] v);
    return {{32{v[31]}}, v};
  endfunction

  function automatic logic [63:0] model(alu_op_e o, bit w, logic [63:0] x, logic [63:0] z);
    logic [63:0] r;
    if (!w) begin
      case (o)
        ALU_ADD:  r = x + z;
        ALU_SUB:  r = x - z;
        ALU_SLL:  r = x << z[5:0];
        ALU_SLT:  r = 64'($signed(x) < $signed(z));
        ALU_SLTU: r = 64'(x < z);
        ALU_XOR:  r = x ^ z;
        ALU_SRL:  r = x >> z[5:0];
        ALU_SRA:  r = 64'($signed(x) >>> z[5:0]);
        ALU_OR:   r = x | z;
        ALU_AND:  r = x & z;
        default:  r = z;
      endcase
    end else begin
      logic [31:0] x32;
      x32 = x[31:0];
      case (o)
        ALU_ADD: r = sx(x32 + z[31:0]);
        ALU_SUB: r = sx(x32 - z[31:0]);
        ALU_SLL: r = sx(x32 << z[4:0]);
        ALU_SRL: r = sx(x32 >> z[4:0]);
        ALU_SRA: r = sx(32'($signed(x32) >>> z[4:0]));
        default: r = sx(model(o, 0, x, z)[31:0]);
      endcase
    end
    return r;
  endfunction

  function automatic logic [63:0] pick();
    case ($urandom_range(0, 5))
      0: return 64'h8000_0000_0000_0000;
      1: return '1;
      2: return 64'(32'h8000_0000);
      3: return 64'($urandom_range(0, 70));
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_e'($urandom_range(0, 10));
      word = (op inside {ALU_ADD, ALU_SUB, ALU_SLL, ALU_SRL, ALU_SRA}) ? 1'($urandom) : 1'b0;
      a = pick(); b = pick();
      #1;
      checks++;
      if (y !== model(op, word, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL: op=%s w=%0b a=%h b=%h y=%h exp=%h", op.name(), word, a, b, y, model(op, word, a, b));
      end
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
