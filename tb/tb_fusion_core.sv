// tb_fusion_core: self-checking test of the pipeline against the reference
// model of tb_rv_pkg.
//
// The core runs with test-bench memories (an instruction array returning two
// words per cycle and a combinational data array). Each program is run both on
// the core and on rv_ref; every retired instruction's PC and register write
// is compared, and so is the data memory at the end. Programs:
//   1. a timing check: K independent instructions then ECALL must take K + 5
//      cycles (one instruction per cycle through five stages);
//   2. a directed program with every fused instruction, back-to-back
//      dependences on them, MUL/DIV and taken branches;
//   3. random programs mixing RV64IM and fused instructions with forward
//      branches.
// At the end each pipeline mechanism (fused retire, 8-byte fetch, interlock,
// MUL/DIV stall, redirect, both bypasses) must have happened at least once.
module tb_fusion_core;
  import fusion_pkg::*;
  import tb_rv_pkg::*;

  localparam int IW = 1024;   // instruction words
  localparam int DW = 512;    // data doublewords

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] imem [IW];
  logic [63:0] dmem [DW];

  logic [63:0] imem_addr, dmem_addr, dmem_wdata, dmem_rdata;
  logic [31:0] imem_word0, imem_word1;
  logic        dmem_valid, dmem_we;
  logic [2:0]  dmem_size;
  logic        retire_valid, retire_we, halted, illegal;
  logic [63:0] retire_pc, retire_wdata;
  logic [31:0] retire_inst;
  logic [4:0]  retire_rd;
  perf_t       perf;

  fusion_core dut (.*);

  // test-bench memories
  assign imem_word0 = imem[int'((imem_addr >> 2) % IW)];
  assign imem_word1 = imem[int'(((imem_addr >> 2) + 1) % IW)];
  always_comb begin
    logic [63:0] w;
    w = dmem[int'((dmem_addr >> 3) % DW)] >> (dmem_addr[2:0] * 8);
    case (dmem_size)
      3'd0: dmem_rdata = {{56{w[7]}}, w[7:0]};
      3'd1: dmem_rdata = {{48{w[15]}}, w[15:0]};
      3'd2: dmem_rdata = {{32{w[31]}}, w[31:0]};
      3'd4: dmem_rdata = {56'b0, w[7:0]};
      3'd5: dmem_rdata = {48'b0, w[15:0]};
      3'd6: dmem_rdata = {32'b0, w[31:0]};
      default: dmem_rdata = w;
    endcase
  end
  always_ff @(posedge clk) begin
    if (dmem_valid && dmem_we)
      for (int b = 0; b < (1 << dmem_size[1:0]); b++)
        dmem[int'((dmem_addr >> 3) % DW)][(int'(dmem_addr[2:0]) + b) * 8 +: 8] <= dmem_wdata[b*8 +: 8];
  end

  int checks = 0, failures = 0;
  rv_ref ref_m;
  logic [31:0] prog [$];
  longint tot_fused, tot_fetch2, tot_lu, tot_md, tot_redir, tot_bm, tot_bw;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // Loads prog and random data, runs until halt, compares with the model.
  task automatic run_program(input string name, input int max_cycles);
    int cyc;
    logic [63:0] rpc, rval;
    bit rwe;
    int rrd;
    rst_n = 0;
    ref_m.reset();
    for (int i = 0; i < IW; i++) begin
      imem[i] = (i < prog.size()) ? prog[i] : 32'h0000_0073;
      ref_m.imem[i] = imem[i];
    end
    for (int i = 0; i < DW; i++) begin
      dmem[i] = {$urandom, $urandom};
      ref_m.dmem[i] = dmem[i];
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    cyc = 0;
    while (!halted && cyc < max_cycles) begin
      @(negedge clk);
      if (retire_valid) begin
        ref_m.step(rpc, rwe, rrd, rval);
        check(retire_pc == rpc, $sformatf("%s: retire pc %h, model %h", name, retire_pc, rpc));
        check(retire_we == rwe, $sformatf("%s: pc %h write enable %0b, model %0b", name, rpc, retire_we, rwe));
        if (rwe)
          check(retire_rd == 5'(rrd) && retire_wdata == rval,
                $sformatf("%s: pc %h x%0d=%h, model x%0d=%h", name, rpc, retire_rd, retire_wdata, rrd, rval));
      end
      cyc++;
    end
    @(negedge clk);
    check(halted && !illegal, $sformatf("%s: halted=%0b illegal=%0b", name, halted, illegal));
    check(ref_m.halted, $sformatf("%s: model did not reach the halt", name));
    for (int i = 0; i < DW; i++)
      check(dmem[i] == ref_m.dmem[i], $sformatf("%s: dmem[%0d] %h, model %h", name, i, dmem[i], ref_m.dmem[i]));
    tot_fused  += perf.fused;   tot_fetch2 += perf.fetch2;
    tot_lu     += perf.load_use; tot_md    += perf.md_stall;
    tot_redir  += perf.redirect; tot_bm    += perf.bypass_mem;
    tot_bw     += perf.bypass_wb;
  endtask

  // ---------------- program generators ----------------
  function automatic void directed();
    prog.delete();
    prog.push_back(ADDI(10, 0, 256));            // data base
    prog.push_back(ADDI(1, 0, 3));
    prog.push_back(ADDI(2, 0, -77));
    prog.push_back(LUI(3, 20'h89ABC));
    prog.push_back(ADDI(3, 3, 1383));
    // LEA, consumed at once (interlock) and by the next-but-one (bypass)
    prog.push_back(LEA(4, 1, 10, 3));            // x4 = (3<<3)+256 = 280
    prog.push_back(ADD(5, 4, 1));
    prog.push_back(LEA(6, 2, 3, 2));
    prog.push_back(ADDI(0, 0, 0));
    prog.push_back(ADD(7, 6, 6));
    // store / indexed load of several widths
    prog.push_back(STORE(3'd3, 3, 10, 0));
    prog.push_back(STORE(3'd3, 2, 10, 8));
    prog.push_back(ADDI(8, 0, 8));
    prog.push_back(IDXLD(9, 10, 8, 3'd3));       // x9 = mem[264]
    prog.push_back(ADD(11, 9, 9));
    prog.push_back(IDXLD(12, 10, 8, 3'd2));
    prog.push_back(IDXLD(13, 10, 8, 3'd6));
    prog.push_back(IDXLD(14, 10, 0, 3'd4));
    // clear upper word
    prog.push_back(CUW(15, 3, 32));
    prog.push_back(CUW(16, 15, 40));
    prog.push_back(CUW(17, 2, 0));
    // LUI / AUIPC idioms, negative low halves included
    prog.push_back(FUSED_HI(0, 18, 32'h1234_5FFF)); prog.push_back(FUSED_LO(0, 0, 18, 32'h1234_5FFF));
    prog.push_back(ADD(19, 18, 18));
    prog.push_back(FUSED_HI(0, 20, 32'h8000_0800)); prog.push_back(FUSED_LO(0, 0, 20, 32'h8000_0800));
    prog.push_back(FUSED_HI(0, 21, 32'd264));       prog.push_back(FUSED_LO(1, 3'd3, 21, 32'd264));
    prog.push_back(ADD(22, 21, 1));
    prog.push_back(FUSED_HI(1, 23, 32'h0000_1234)); prog.push_back(FUSED_LO(0, 0, 23, 32'h0000_1234));
    // AUIPC + load of address 256: pc of this word is 4*prog.size()
    begin
      logic [31:0] c;
      c = 32'(256 - 4 * prog.size());
      prog.push_back(FUSED_HI(1, 24, c)); prog.push_back(FUSED_LO(1, 3'd3, 24, c));
    end
    // multiply / divide, dependent on a load (bypass into the unit)
    prog.push_back(MULDIV(3'd0, 0, 25, 3, 2));
    prog.push_back(MULDIV(3'd1, 0, 26, 3, 2));
    prog.push_back(MULDIV(3'd4, 0, 27, 3, 2));
    prog.push_back(MULDIV(3'd6, 1, 28, 3, 1));
    prog.push_back(MULDIV(3'd5, 0, 29, 3, 0));
    prog.push_back(ADD(30, 29, 25));
    // small loop: 5 iterations using LEA and indexed load
    prog.push_back(ADDI(1, 0, 5));
    prog.push_back(ADDI(31, 0, 0));
    prog.push_back(LEA(4, 1, 10, 3));            // loop:
    prog.push_back(IDXLD(5, 4, 0, 3'd3));
    prog.push_back(ADD(31, 31, 5));
    prog.push_back(ADDI(1, 1, -1));
    prog.push_back(BRANCH(3'd1, 1, 0, -16));
    prog.push_back(JAL(2, 8));
    prog.push_back(ADDI(31, 31, 1));             // skipped
    prog.push_back(ECALL());
  endfunction

  // Random program: slot kinds first (some are 8 bytes), then encoding with
  // forward branch targets.
  function automatic void random_prog(int n);
    int kind [$];
    int addr [$];
    int a;
    prog.delete();
    prog.push_back(ADDI(10, 0, 256));
    prog.push_back(ADDI(11, 0, 24));
    for (int r = 1; r < 32; r++)
      if (r != 10 && r != 11) begin
        logic [31:0] c;
        c = $urandom;
        prog.push_back(FUSED_HI(0, r, c)); prog.push_back(FUSED_LO(0, 0, r, c));
      end
    a = 4 * prog.size();
    for (int i = 0; i < n; i++) begin
      int k;
      k = $urandom_range(0, 15);
      kind.push_back(k);
      addr.push_back(a);
      a += (k == 11 || k == 12) ? 8 : 4;
    end
    addr.push_back(a);   // the final ECALL
    for (int i = 0; i < n; i++) begin
      int rd, rs1, rs2;
      do rd = $urandom_range(1, 31); while (rd == 10 || rd == 11);
      rs1 = $urandom_range(0, 31);
      rs2 = $urandom_range(0, 31);
      case (kind[i])
        0: begin
          logic [2:0] f3;
          f3 = 3'($urandom_range(0, 7));
          prog.push_back(enc_r((f3 == 3'd0 || f3 == 3'd5) && $urandom_range(0, 1) ? 7'b0100000 : 7'b0,
                               rs2, rs1, f3, rd, 7'b0110011));
        end
        1: begin
          logic [2:0] f3;
          logic [11:0] imm;
          f3  = 3'($urandom_range(0, 7));
          imm = 12'($urandom);
          if (f3 == 3'd1) imm = {6'b0, imm[5:0]};
          if (f3 == 3'd5) imm = {1'b0, imm[10], 4'b0, imm[5:0]};
          prog.push_back(enc_i(imm, rs1, f3, rd, 7'b0010011));
        end
        2: prog.push_back(ADDI(rd, rs1, $urandom_range(0, 4095) - 2048));
        3: begin
          logic [2:0] f3;
          logic [1:0] sel;
          sel = 2'($urandom_range(0, 2));
          f3  = (sel == 0) ? 3'd0 : (sel == 1) ? 3'd1 : 3'd5;
          if ($urandom_range(0, 1))
            prog.push_back(enc_r((f3 != 3'd1) && $urandom_range(0, 1) ? 7'b0100000 : 7'b0,
                                 rs2, rs1, f3, rd, 7'b0111011));
          else
            prog.push_back(enc_i(f3 == 3'd0 ? 12'($urandom) :
                                 {1'b0, (f3 == 3'd5) && $urandom_range(0, 1), 5'b0, 5'($urandom)},
                                 rs1, f3, rd, 7'b0011011));
        end
        4: begin
          logic [2:0] f3;
          f3 = 3'($urandom_range(0, 6));
          prog.push_back(LOAD(f3, rd, 10, $urandom_range(0, 31) * 8));
        end
        5: prog.push_back(STORE(3'($urandom_range(0, 3)), rs2, 10, $urandom_range(0, 31) * 8));
        6: prog.push_back(MULDIV(3'($urandom_range(0, 7)), 0, rd, rs1, rs2));
        7: prog.push_back(MULDIV($urandom_range(0, 1) ? 3'd0 : 3'($urandom_range(4, 7)), 1, rd, rs1, rs2));
        8: prog.push_back(LEA(rd, rs1, rs2, $urandom_range(0, 63)));
        9: prog.push_back(IDXLD(rd, 10, 11, 3'($urandom_range(0, 6))));
        10: prog.push_back(CUW(rd, rs1, $urandom_range(0, 63)));
        11: begin
          logic [31:0] c;
          c = $urandom;
          prog.push_back(FUSED_HI($urandom_range(0, 1), rd, c)); prog.push_back(FUSED_LO(0, 0, rd, c));
        end
        12: begin
          bit au;
          logic [31:0] c;
          au = $urandom_range(0, 1);
          c = 32'(256 + 8 * $urandom_range(0, 31));
          if (au) c = c - 32'(addr[i]);
          prog.push_back(FUSED_HI(au, rd, c)); prog.push_back(FUSED_LO(1, 3'($urandom_range(0, 6)), rd, c));
        end
        13: begin
          int j;
          logic [2:0] f3;
          j = i + $urandom_range(1, 4);
          if (j > n) j = n;
          do f3 = 3'($urandom_range(0, 7)); while (f3 == 3'd2 || f3 == 3'd3);
          prog.push_back(BRANCH(f3, rs1, rs2, addr[j] - addr[i]));
        end
        14: begin
          int j;
          j = i + $urandom_range(1, 3);
          if (j > n) j = n;
          prog.push_back(JAL(rd, addr[j] - addr[i]));
        end
        default: prog.push_back($urandom_range(0, 1) ? AUIPC(rd, 20'($urandom)) : LUI(rd, 20'($urandom)));
      endcase
    end
    prog.push_back(ECALL());
  endfunction

  initial begin
    ref_m = new(IW, DW);
    tot_fused = 0; tot_fetch2 = 0; tot_lu = 0; tot_md = 0; tot_redir = 0; tot_bm = 0; tot_bw = 0;

    // 1. throughput / latency: 20 independent instructions, then ECALL
    prog.delete();
    for (int i = 0; i < 20; i++) prog.push_back(ADDI(1 + i % 8, 0, i));
    prog.push_back(ECALL());
    run_program("timing", 200);
    check(perf.cycles == 64'd25, $sformatf("timing: %0d cycles, expected 25", perf.cycles));
    check(perf.instret == 64'd21, $sformatf("timing: %0d retired, expected 21", perf.instret));

    // 2. directed
    directed();
    run_program("directed", 5000);
    check(perf.fused == 64'(ref_m.n_fused), $sformatf("directed: %0d fused retired, model %0d",
                                                       perf.fused, ref_m.n_fused));

    // 3. random
    for (int t = 0; t < 12; t++) begin
      random_prog(300);
      run_program($sformatf("random%0d", t), 60000);
    end

    check(tot_fused > 0,  "no fused instruction retired");
    check(tot_fetch2 > 0, "no 8-byte fused instruction retired");
    check(tot_lu > 0,     "decode interlock never happened");
    check(tot_md > 0,     "MUL/DIV stall never happened");
    check(tot_redir > 0,  "no redirect");
    check(tot_bm > 0,     "no bypass from the memory stage");
    check(tot_bw > 0,     "no bypass from write-back");
    $display("mechanisms: fused=%0d fetch2=%0d interlock=%0d mdstall=%0d redirect=%0d bypass_mem=%0d bypass_wb=%0d",
             tot_fused, tot_fetch2, tot_lu, tot_md, tot_redir, tot_bm, tot_bw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
