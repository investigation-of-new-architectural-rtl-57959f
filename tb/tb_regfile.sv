// tb_regfile: self-checking test of the register file. Random writes and
// reads on both ports against an array kept here; x0 must read zero even
// after a write, and a read of the register being written in the same cycle
// must return the new value.
module tb_regfile;
  logic        clk = 0, rst_n = 0;
  logic [4:0]  raddr1, raddr2, waddr;
  logic [63:0] rdata1, rdata2, wdata;
  logic        we;
  logic [63:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  regfile dut (.*);

  task automatic chk(input logic [63:0] got, input logic [63:0] e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %h exp %h", what, got, e);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    we = 0; raddr1 = 0; raddr2 = 0; waddr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 5'($urandom); wdata = {$urandom, $urandom};
      raddr1 = ($urandom_range(0, 3) == 0) ? waddr : 5'($urandom);
      raddr2 = 5'($urandom);
      #1;
      chk(rdata1, (raddr1 == 0) ? 64'd0 : (we && waddr == raddr1) ? wdata : model[raddr1], "port 1");
      chk(rdata2, (raddr2 == 0) ? 64'd0 : (we && waddr == raddr2) ? wdata : model[raddr2], "port 2");
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
