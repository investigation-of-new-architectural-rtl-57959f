// tb_rv_pkg: test-bench support for the fused-instruction RV64IM core.
//
// * Instruction encoders for the RV64IM instructions and the fused
//   instructions (LEA, indexed load, clear upper word, LUI/AUIPC idioms).
// * rv_ref: an instruction-level reference model written independently of
//   the RTL. step() executes one instruction (a fused one counts as one) and
//   returns what it wrote, so a test bench can compare it with the core's
//   retire trace. Memories are separate instruction and data arrays whose
//   addresses wrap modulo their sizes, like the RTL memories.
package tb_rv_pkg;

  // ---------------- encoders ----------------
  function automatic logic [31:0] enc_r(input logic [6:0] f7, input int rs2, input int rs1,
                                        input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] enc_i(input logic [11:0] imm, input int rs1,
                                        input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {imm, 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] enc_s(input logic [11:0] imm, input int rs2, input int rs1,
                                        input logic [2:0] f3);
    return {imm[11:5], 5'(rs2), 5'(rs1), f3, imm[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(input logic [12:0] off, input int rs2, input int rs1,
                                        input logic [2:0] f3);
    return {off[12], off[10:5], 5'(rs2), 5'(rs1), f3, off[4:1], off[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_u(input logic [19:0] imm, input int rd, input logic [6:0] op);
    return {imm, 5'(rd), op};
  endfunction
  function automatic logic [31:0] enc_j(input logic [20:0] off, input int rd);
    return {off[20], off[10:1], off[11], off[19:12], 5'(rd), 7'b1101111};
  endfunction

  function automatic logic [31:0] ADDI(input int rd, input int rs1, input int imm);
    return enc_i(12'(imm), rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] ADD(input int rd, input int rs1, input int rs2);
    return enc_r(7'b0, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] SLLI(input int rd, input int rs1, input int sh);
    return enc_i(12'(sh), rs1, 3'b001, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] SRLI(input int rd, input int rs1, input int sh);
    return enc_i(12'(sh), rs1, 3'b101, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] LUI(input int rd, input logic [19:0] imm);
    return enc_u(imm, rd, 7'b0110111);
  endfunction
  function automatic logic [31:0] AUIPC(input int rd, input logic [19:0] imm);
    return enc_u(imm, rd, 7'b0010111);
  endfunction
  function automatic logic [31:0] LOAD(input logic [2:0] f3, input int rd, input int rs1, input int imm);
    return enc_i(12'(imm), rs1, f3, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] STORE(input logic [2:0] f3, input int rs2, input int rs1, input int imm);
    return enc_s(12'(imm), rs2, rs1, f3);
  endfunction
  function automatic logic [31:0] BRANCH(input logic [2:0] f3, input int rs1, input int rs2, input int off);
    return enc_b(13'(off), rs2, rs1, f3);
  endfunction
  function automatic logic [31:0] JAL(input int rd, input int off);
    return enc_j(21'(off), rd);
  endfunction
  function automatic logic [31:0] JALR(input int rd, input int rs1, input int imm);
    return enc_i(12'(imm), rs1, 3'b000, rd, 7'b1100111);
  endfunction
  function automatic logic [31:0] MULDIV(input logic [2:0] f3, input bit word, input int rd,
                                         input int rs1, input int rs2);
    return enc_r(7'b0000001, rs2, rs1, f3, rd, word ? 7'b0111011 : 7'b0110011);
  endfunction
  function automatic logic [31:0] ECALL();
    return 32'h0000_0073;
  endfunction
  // fused
  function automatic logic [31:0] LEA(input int rd, input int rs1, input int rs2, input int sh);
    return enc_r(7'(sh), rs2, rs1, 3'b000, rd, 7'b0001011);
  endfunction
  function automatic logic [31:0] IDXLD(input int rd, input int rs1, input int rs2, input logic [2:0] f3);
    return enc_r({4'b0, f3}, rs2, rs1, 3'b001, rd, 7'b0001011);
  endfunction
  function automatic logic [31:0] CUW(input int rd, input int rs1, input int sh);
    return enc_i(12'(sh), rs1, 3'b010, rd, 7'b0001011);
  endfunction
  // 8-byte idioms: first word (upper 20 bits of the constant) ...
  function automatic logic [31:0] FUSED_HI(input bit auipc, input int rd, input logic [31:0] c);
    return enc_u(c[31:12], rd, auipc ? 7'b1011011 : 7'b0101011);
  endfunction
  // ... and second word: ADDI (load = 0) or a load of width f3
  function automatic logic [31:0] FUSED_LO(input bit load, input logic [2:0] f3, input int rd,
                                           input logic [31:0] c);
    return load ? LOAD(f3, rd, rd, int'($signed(c[11:0]))) : ADDI(rd, rd, int'($signed(c[11:0])));
  endfunction

  // ---------------- reference model ----------------
  class rv_ref;
    logic [63:0] x [32];
    logic [63:0] pc;
    logic [31:0] imem [];
    logic [63:0] dmem [];
    longint      iw, dw;
    bit          halted;
    bit          illegal;
    int          n_fused;

    function new(int imem_words, int dmem_dwords);
      imem = new[imem_words];
      dmem = new[dmem_dwords];
      iw = imem_words;
      dw = dmem_dwords;
      reset();
    endfunction

    function void reset();
      foreach (x[i]) x[i] = '0;
      pc = '0; halted = 0; illegal = 0; n_fused = 0;
    endfunction

    function logic [31:0] fetch(logic [63:0] a);
      logic [63:0] i;
      i = (a >> 2) % 64'(iw);
      return imem[i[31:0]];
    endfunction

    function logic [63:0] load(logic [63:0] a, logic [2:0] f3);
      logic [63:0] w;
      int sh;
      logic [63:0] i;
      i  = (a >> 3) % 64'(dw);
      w  = dmem[i[31:0]];
      sh = int'(a[2:0]) * 8;
      w  = w >> sh;
      case (f3)
        3'd0: return {{56{w[7]}}, w[7:0]};
        3'd1: return {{48{w[15]}}, w[15:0]};
        3'd2: return {{32{w[31]}}, w[31:0]};
        3'd4: return {56'b0, w[7:0]};
        3'd5: return {48'b0, w[15:0]};
        3'd6: return {32'b0, w[31:0]};
        default: return w;
      endcase
    endfunction

    function void store(logic [63:0] a, logic [2:0] f3, logic [63:0] v);
      int nbytes;
      logic [63:0] i;
      i = (a >> 3) % 64'(dw);
      nbytes = 1 << f3[1:0];
      for (int b = 0; b < nbytes; b++)
        dmem[i[31:0]][(int'(a[2:0]) + b) * 8 +: 8] = v[b*8 +: 8];
    endfunction

    static function logic [63:0] sext32(logic [31:0] v);
      return {{32{v[31]}}, v};
    endfunction

    static function logic [63:0] muldiv(logic [2:0] f3, bit w, logic [63:0] a, logic [63:0] b);
      logic signed [127:0] p;
      logic [63:0] r;
      if (w) begin
        logic signed [31:0] sa, sb;
        logic [31:0] ua, ub, r32;
        sa = a[31:0]; sb = b[31:0]; ua = a[31:0]; ub = b[31:0];
        case (f3)
          3'd0: r32 = ua * ub;
          3'd4: r32 = (sb == 0) ? 32'hFFFF_FFFF : (sa == 32'sh8000_0000 && sb == -1) ? ua : 32'(sa / sb);
          3'd5: r32 = (ub == 0) ? 32'hFFFF_FFFF : ua / ub;
          3'd6: r32 = (sb == 0) ? ua : (sa == 32'sh8000_0000 && sb == -1) ? 32'h0 : 32'(sa % sb);
          default: r32 = (ub == 0) ? ua : ua % ub;
        endcase
        return sext32(r32);
      end
      case (f3)
        3'd0: r = a * b;
        3'd1: begin p = $signed({{64{a[63]}}, a}) * $signed({{64{b[63]}}, b}); r = p[127:64]; end
        3'd2: begin p = $signed({{64{a[63]}}, a}) * $signed({64'b0, b}); r = p[127:64]; end
        3'd3: begin p = $signed({64'b0, a}) * $signed({64'b0, b}); r = p[127:64]; end
        3'd4: r = (b == 0) ? '1 : (a == 64'h8000_0000_0000_0000 && b == '1) ? a :
                  64'($signed(a) / $signed(b));
        3'd5: r = (b == 0) ? '1 : a / b;
        3'd6: r = (b == 0) ? a : (a == 64'h8000_0000_0000_0000 && b == '1) ? 64'h0 :
                  64'($signed(a) % $signed(b));
        default: r = (b == 0) ? a : a % b;
      endcase
      return r;
    endfunction

    // Executes one instruction. Returns the write (we, rd, value) and the PC.
    function void step(output logic [63:0] ipc, output bit we, output int rd, output logic [63:0] val);
      logic [31:0] in, in2;
      logic [6:0]  op;
      logic [2:0]  f3;
      logic [6:0]  f7;
      logic [63:0] a, b, ii, r, npc, c;
      int          rs1, rs2;
      bit          wr;
      in  = fetch(pc);
      in2 = fetch(pc + 4);
      op  = in[6:0]; f3 = in[14:12]; f7 = in[31:25];
      rd  = int'(in[11:7]); rs1 = int'(in[19:15]); rs2 = int'(in[24:20]);
      a   = x[rs1]; b = x[rs2];
      ii  = {{52{in[31]}}, in[31:20]};
      npc = pc + 4; wr = 1; r = '0;
      ipc = pc;
      case (op)
        7'b0110111: r = sext32({in[31:12], 12'b0});
        7'b0010111: r = pc + sext32({in[31:12], 12'b0});
        7'b1101111: begin
          r = pc + 4;
          npc = pc + {{43{in[31]}}, in[31], in[19:12], in[20], in[30:21], 1'b0};
        end
        7'b1100111: begin r = pc + 4; npc = (a + ii) & ~64'd1; end
        7'b1100011: begin
          bit t;
          wr = 0;
          case (f3)
            3'd0: t = (a == b);
            3'd1: t = (a != b);
            3'd4: t = ($signed(a) < $signed(b));
            3'd5: t = ($signed(a) >= $signed(b));
            3'd6: t = (a < b);
            default: t = (a >= b);
          endcase
          if (t) npc = pc + {{51{in[31]}}, in[31], in[7], in[30:25], in[11:8], 1'b0};
        end
        7'b0000011: r = load(a + ii, f3);
        7'b0100011: begin wr = 0; store(a + {{52{in[31]}}, in[31:25], in[11:7]}, f3, b); end
        7'b0010011: begin
          case (f3)
            3'd0: r = a + ii;
            3'd1: r = a << in[25:20];
            3'd2: r = ($signed(a) < $signed(ii)) ? 1 : 0;
            3'd3: r = (a < ii) ? 1 : 0;
            3'd4: r = a ^ ii;
            3'd5: r = in[30] ? 64'($signed(a) >>> in[25:20]) : a >> in[25:20];
            3'd6: r = a | ii;
            default: r = a & ii;
          endcase
        end
        7'b0011011: begin
          logic [31:0] a32;
          a32 = a[31:0];
          case (f3)
            3'd0: r = sext32(a32 + ii[31:0]);
            3'd1: r = sext32(a32 << in[24:20]);
            default: r = in[30] ? sext32(32'($signed(a32) >>> in[24:20])) : sext32(a32 >> in[24:20]);
          endcase
        end
        7'b0110011: begin
          if (f7 == 7'b0000001) r = muldiv(f3, 0, a, b);
          else case (f3)
            3'd0: r = in[30] ? a - b : a + b;
            3'd1: r = a << b[5:0];
            3'd2: r = ($signed(a) < $signed(b)) ? 1 : 0;
            3'd3: r = (a < b) ? 1 : 0;
            3'd4: r = a ^ b;
            3'd5: r = in[30] ? 64'($signed(a) >>> b[5:0]) : a >> b[5:0];
            3'd6: r = a | b;
            default: r = a & b;
          endcase
        end
        7'b0111011: begin
          logic [31:0] a32, b32;
          a32 = a[31:0]; b32 = b[31:0];
          if (f7 == 7'b0000001) r = muldiv(f3, 1, a, b);
          else case (f3)
            3'd0: r = in[30] ? sext32(a32 - b32) : sext32(a32 + b32);
            3'd1: r = sext32(a32 << b32[4:0]);
            default: r = in[30] ? sext32(32'($signed(a32) >>> b32[4:0])) : sext32(a32 >> b32[4:0]);
          endcase
        end
        7'b0001111: wr = 0;
        7'b1110011: begin wr = 0; halted = 1; end
        7'b0001011: begin
          n_fused++;
          case (f3)
            3'd0: r = (a << in[30:25]) + b;
            3'd1: r = load(a + b, in[27:25]);
            default: r = (a << in[25:20]) >> in[25:20];
          endcase
        end
        7'b0101011, 7'b1011011: begin
          n_fused++;
          c = sext32({in[31:12], in2[31:20]});
          if (op == 7'b1011011) c = pc + c;
          r = (in2[6:0] == 7'b0000011) ? load(c, in2[14:12]) : c;
          npc = pc + 8;
        end
        default: begin wr = 0; halted = 1; illegal = 1; end
      endcase
      if (halted) npc = pc;
      we  = wr && (rd != 0);
      val = r;
      if (we) x[rd] = r;
      pc = npc;
    endfunction
  endclass

endpackage
