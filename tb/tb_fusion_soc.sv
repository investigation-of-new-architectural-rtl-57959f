// tb_fusion_soc: end-to-end test of the top level at its default sizes.
//
// A small kernel built from the idioms the fused instructions replace is run
// twice on fusion_soc: once written with ordinary RV64IM pairs and once with
// the fused instructions. The kernel walks an array A of N doublewords:
//   for i in 0..N-1:  x5 = A[i]            (slli + add + ld  | slli + IDXLD)
//                     x6 = &B[i]           (slli + add       | LEA)
//                     x7 = zext32(x5)      (slli + srli      | CUW)
//                     sum += x7 ; B[i] = sum
//   result  = sum * K + bias               (K via lui+addi, bias via auipc+ld)
//   result2 = *(0x1F10)                    (lui+ld)
// The program is written through the program port, the data through the host
// port, and the results are read back and compared with values computed here.
// Checks: results of both versions; the fused version retires exactly as
// many fewer instructions as it executed fused instructions; its cycle saving
// equals the instructions saved minus the extra interlock bubbles; and every
// mechanism (fused retire, 8-byte fetch, interlock, MUL/DIV stall, redirect,
// both bypasses) occurred.
module tb_fusion_soc;
  import fusion_pkg::*;
  import tb_rv_pkg::*;

  localparam int N      = 64;
  localparam int A_BASE = 32'h800;    // array A (byte address)
  localparam int B_BASE = 32'hC00;    // array B
  localparam int G_BIAS = 32'h1F00;   // global "bias"
  localparam int G_RES  = 32'h1F08;   // result
  localparam int G_ABS  = 32'h1F10;   // value read through lui+ld
  localparam logic [31:0] K = 32'h0001_2345;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        prog_we = 0, host_we = 0;
  logic [11:0] prog_index = '0;
  logic [31:0] prog_data = '0;
  logic [10:0] host_index = '0;
  logic [63:0] host_wdata = '0, host_rdata;
  logic        retire_valid, retire_we, halted, illegal;
  logic [63:0] retire_pc, retire_wdata;
  logic [31:0] retire_inst;
  logic [4:0]  retire_rd;
  perf_t       perf;

  fusion_soc dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] prog [$];
  logic [63:0] a_data [N];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // lui+addi or its fused form (rd = 32-bit constant c)
  function automatic void li32(bit fused, int rd, logic [31:0] c);
    if (fused) begin
      prog.push_back(FUSED_HI(0, rd, c)); prog.push_back(FUSED_LO(0, 0, rd, c));
    end else begin
      logic [31:0] hi;
      hi = c + 32'h800;   // compensate for the sign of the low 12 bits
      prog.push_back(LUI(rd, hi[31:12])); prog.push_back(ADDI(rd, rd, int'($signed(c[11:0]))));
    end
  endfunction

  // auipc-based: rd = pc + off (load = 0) or rd = load(pc + off)
  function automatic void auipc_pair(bit fused, bit load, int rd, logic [31:0] target);
    logic [31:0] off, hi;
    off = target - 32'(4 * prog.size());
    if (fused) begin
      prog.push_back(FUSED_HI(1, rd, off)); prog.push_back(FUSED_LO(load, 3'd3, rd, off));
    end else begin
      hi = off + 32'h800;
      prog.push_back(AUIPC(rd, hi[31:12]));
      prog.push_back(load ? LOAD(3'd3, rd, rd, int'($signed(off[11:0])))
                          : ADDI(rd, rd, int'($signed(off[11:0]))));
    end
  endfunction

  function automatic void build(bit fused);
    int loop_at;
    prog.delete();
    li32(fused, 10, A_BASE);
    li32(fused, 15, B_BASE);
    li32(fused, 16, K);
    prog.push_back(ADDI(11, 0, N));
    prog.push_back(ADDI(12, 0, 0));
    prog.push_back(ADDI(13, 0, 0));
    loop_at = prog.size();
    prog.push_back(SLLI(8, 12, 3));                        // x8 = i*8
    if (fused) prog.push_back(IDXLD(5, 8, 10, 3'd3));      // x5 = A[i]
    else begin prog.push_back(ADD(5, 8, 10)); prog.push_back(LOAD(3'd3, 5, 5, 0)); end
    if (fused) prog.push_back(CUW(7, 5, 32));              // x7 = zext32(x5)
    else begin prog.push_back(SLLI(7, 5, 32)); prog.push_back(SRLI(7, 7, 32)); end
    if (fused) prog.push_back(LEA(6, 12, 15, 3));          // x6 = &B[i]
    else begin prog.push_back(SLLI(6, 12, 3)); prog.push_back(ADD(6, 6, 15)); end
    prog.push_back(ADD(13, 13, 7));
    prog.push_back(STORE(3'd3, 13, 6, 0));
    prog.push_back(ADDI(12, 12, 1));
    prog.push_back(BRANCH(3'd4, 12, 11, 4 * (loop_at - prog.size())));   // blt
    prog.push_back(MULDIV(3'd0, 0, 13, 13, 16));          // sum * K
    auipc_pair(fused, 1, 21, G_BIAS);                      // x21 = bias
    prog.push_back(ADD(13, 13, 21));
    auipc_pair(fused, 0, 22, G_RES);                       // x22 = &result
    prog.push_back(STORE(3'd3, 13, 22, 0));
    if (fused) begin
      prog.push_back(FUSED_HI(0, 23, G_ABS)); prog.push_back(FUSED_LO(1, 3'd3, 23, G_ABS));
    end else begin
      prog.push_back(LUI(23, 20'((G_ABS + 32'h800) >> 12)));
      prog.push_back(LOAD(3'd3, 23, 23, int'($signed(12'(G_ABS)))));
    end
    prog.push_back(STORE(3'd3, 23, 22, 8));
    prog.push_back(ECALL());
  endfunction

  perf_t p_unf, p_fus;

  task automatic run(input bit fused, output perf_t p);
    logic [63:0] sum, exp;
    rst_n = 0;
    build(fused);
    @(negedge clk);
    for (int i = 0; i < prog.size(); i++) begin
      prog_we = 1; prog_index = 12'(i); prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 0;
    for (int i = 0; i < N; i++) begin
      host_we = 1; host_index = 11'((A_BASE >> 3) + i); host_wdata = a_data[i];
      @(negedge clk);
    end
    host_index = 11'(G_BIAS >> 3); host_wdata = 64'h0123_4567_89AB_CDEF; @(negedge clk);
    host_index = 11'(G_ABS >> 3);  host_wdata = 64'hFEED_F00D_0000_0042; @(negedge clk);
    host_we = 0;
    rst_n = 1;
    wait (halted);
    @(negedge clk);
    p = perf;
    check(!illegal, "illegal instruction");
    // expected values
    sum = 0;
    for (int i = 0; i < N; i++) begin
      sum += {32'b0, a_data[i][31:0]};
      host_index = 11'((B_BASE >> 3) + i); #1;
      check(host_rdata == sum, $sformatf("fused=%0b B[%0d]=%h expected %h", fused, i, host_rdata, sum));
    end
    exp = sum * {32'b0, K} + 64'h0123_4567_89AB_CDEF;
    host_index = 11'(G_RES >> 3); #1;
    check(host_rdata == exp, $sformatf("fused=%0b result %h expected %h", fused, host_rdata, exp));
    host_index = 11'((G_RES >> 3) + 1); #1;
    check(host_rdata == 64'hFEED_F00D_0000_0042, $sformatf("fused=%0b result2 %h", fused, host_rdata));
    $display("fused=%0b: cycles=%0d instret=%0d fused=%0d fetch2=%0d interlock=%0d mdstall=%0d redirect=%0d bypass_mem=%0d bypass_wb=%0d",
             fused, p.cycles, p.instret, p.fused, p.fetch2, p.load_use, p.md_stall, p.redirect,
             p.bypass_mem, p.bypass_wb);
  endtask

  initial begin
    for (int i = 0; i < N; i++) a_data[i] = {$urandom, $urandom};
    run(0, p_unf);
    run(1, p_fus);
    // fused-instruction accounting
    check(p_unf.fused == 0, "unfused program retired fused instructions");
    check(p_fus.fused == 64'(3 + 3 * N + 3),
          $sformatf("fused count %0d, expected %0d", p_fus.fused, 3 + 3 * N + 3));
    check(p_fus.fetch2 == 64'(3 + 3), $sformatf("8-byte fused count %0d, expected 6", p_fus.fetch2));
    check(p_unf.instret - p_fus.instret == p_fus.fused,
          $sformatf("instructions saved %0d, fused %0d", p_unf.instret - p_fus.instret, p_fus.fused));
    check(p_unf.cycles - p_fus.cycles ==
          (p_unf.instret - p_fus.instret) - (p_fus.load_use - p_unf.load_use),
          $sformatf("cycle saving %0d does not match", p_unf.cycles - p_fus.cycles));
    check(p_fus.cycles < p_unf.cycles, "fused program not faster");
    // every mechanism happened
    check(p_fus.load_use > 0,   "no interlock");
    check(p_fus.md_stall == 64'(XLEN + 1), $sformatf("MUL stall %0d cycles, expected %0d", p_fus.md_stall, XLEN + 1));
    check(p_fus.redirect == 64'(N - 1), $sformatf("redirects %0d, expected %0d", p_fus.redirect, N - 1));
    check(p_fus.bypass_mem > 0, "no memory-stage bypass");
    check(p_fus.bypass_wb > 0,  "no write-back bypass");
    $display("instruction count reduction %0d of %0d, cycles %0d -> %0d",
             p_unf.instret - p_fus.instret, p_unf.instret, p_unf.cycles, p_fus.cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
