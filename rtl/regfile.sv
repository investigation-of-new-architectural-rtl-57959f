// regfile: the integer register file (x0..x31, x0 reads as zero).
//
// Two combinational read ports used in the decode stage, one write port
// written at the clock edge by the write-back stage. A read of the register
// being written in the same cycle returns the new value (write-first), so the
// decode stage needs no separate bypass from write-back. Registers reset to 0.
module regfile
  import fusion_pkg::*;
#(
  parameter int NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] raddr1,
  input  logic [$clog2(NREGS)-1:0] raddr2,
  output logic [XLEN-1:0]          rdata1,
  output logic [XLEN-1:0]          rdata2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [XLEN-1:0]          wdata
);

  logic [XLEN-1:0] regs [1:NREGS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < NREGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    if (raddr1 == '0)                   rdata1 = '0;
    else if (we && waddr == raddr1)     rdata1 = wdata;
    else                                rdata1 = regs[raddr1];
    if (raddr2 == '0)                   rdata2 = '0;
    else if (we && waddr == raddr2)     rdata2 = wdata;
    else                                rdata2 = regs[raddr2];
  end

endmodule
