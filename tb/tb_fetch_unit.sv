// tb_fetch_unit: self-checking test of the fetch stage. An instruction array
// in the test bench mixes 4-byte words and 8-byte fused LUI/AUIPC words; the
// decode register must receive each instruction once, in order, with the PC
// stepping by 4 or 8, one instruction per cycle. Random stalls must hold it,
// a redirect must squash the word in decode and restart at the target, and
// disabling fetch must insert bubbles.
module tb_fetch_unit;
  import fusion_pkg::*;
  import tb_rv_pkg::*;

  localparam int W = 512;
  logic        clk = 0, rst_n = 0;
  logic        enable, stall, redirect, id_valid, id_fetch2;
  logic [63:0] redirect_pc, fetch_addr, id_pc;
  logic [31:0] fetch_word0, fetch_word1, id_inst, id_inst2;
  logic [31:0] mem [W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fetch_unit dut (.*);

  assign fetch_word0 = mem[int'(fetch_addr[10:2])];
  assign fetch_word1 = mem[int'(fetch_addr[10:2]) + 1];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s (id_pc %h)", what, id_pc);
    end
  endtask

  // expected size of the instruction at a byte address
  function automatic int size_at(logic [63:0] a);
    logic [6:0] op;
    op = mem[int'(a[10:2])][6:0];
    return (op == 7'b0101011 || op == 7'b1011011) ? 8 : 4;
  endfunction

  initial begin
    logic [63:0] exp_pc;
    int k, stalls, bubbles, accepted;
    k = 0;
    while (k < W - 2) begin
      if ($urandom_range(0, 3) == 0) begin
        logic [31:0] c;
        c = $urandom;
        mem[k] = FUSED_HI($urandom_range(0, 1), 5, c); mem[k + 1] = FUSED_LO(0, 0, 5, c);
        k += 2;
      end else begin
        mem[k] = ADDI(k % 31 + 1, 0, k);
        k += 1;
      end
    end
    mem[W - 2] = ECALL(); mem[W - 1] = ECALL();
    enable = 1; stall = 0; redirect = 0; redirect_pc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_pc = 0; stalls = 0; bubbles = 0; accepted = 0;
    // sequential run with random stalls; count cycles per instruction
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      if (id_valid && !stall) begin
        chk(id_pc == exp_pc, $sformatf("expected pc %h", exp_pc));
        chk(id_inst == mem[int'(exp_pc[10:2])], "instruction word");
        chk(id_fetch2 == (size_at(exp_pc) == 8), "fetch2 flag");
        if (id_fetch2) chk(id_inst2 == mem[int'(exp_pc[10:2]) + 1], "second word");
        exp_pc += 64'(size_at(exp_pc));
        accepted++;
      end
      stall = ($urandom_range(0, 4) == 0);
      if (stall) stalls++;
    end
    // one instruction per cycle when not stalled (first cycle fills decode)
    chk(accepted >= 300 - stalls - 2, $sformatf("throughput: %0d accepted, %0d stalls", accepted, stalls));
    // redirect to an 8-byte instruction boundary
    @(negedge clk);
    stall = 0;
    k = 40; while (size_at(64'(4 * k)) != 8) k++;
    redirect = 1; redirect_pc = 64'(4 * k);
    @(negedge clk);
    redirect = 0;
    chk(!id_valid, "redirect squashes decode");
    @(negedge clk);
    chk(id_valid && id_pc == 64'(4 * k) && id_fetch2, "fetch restarts at the target");
    chk(fetch_addr == 64'(4 * k + 8), "PC advanced by 8 after a fused instruction");
    // disable: bubbles
    enable = 0;
    @(negedge clk);
    chk(!id_valid, "disabled fetch gives a bubble");
    chk(fetch_addr == 64'(4 * k + 8), "PC holds while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
