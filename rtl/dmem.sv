// dmem: data memory of the core's memory stage.
//
// Stands in the place of the level-1 data cache: a 64-bit wide array, read
// combinationally and written at the clock edge, with no misses. The core port
// takes a byte address, an access size as the RISC-V load/store funct3
// (B, H, W, D and the unsigned loads BU, HU, WU) and the store data in the low
// bits; loads return the selected bytes sign- or zero-extended to 64 bits.
// Accesses must be naturally aligned. A second, doubleword-wide host port
// lets a test bench preload and inspect memory; a core store wins over a host
// write to the same doubleword in the same cycle. Addresses wrap modulo the
// memory size.
module dmem #(
  parameter int DWORDS = 2048   // 16 KiB
) (
  input  logic                      clk,
  // core port
  input  logic                      req_valid,
  input  logic                      req_we,
  input  logic [2:0]                req_size,
  input  logic [63:0]               req_addr,
  input  logic [63:0]               req_wdata,
  output logic [63:0]               rdata,
  // host port
  input  logic                      host_we,
  input  logic [$clog2(DWORDS)-1:0] host_index,
  input  logic [63:0]               host_wdata,
  output logic [63:0]               host_rdata
);

  localparam int AW = $clog2(DWORDS);

  logic [63:0]   mem [DWORDS];
  logic [AW-1:0] idx;
  logic [2:0]    off;
  logic [63:0]   word, shifted, wmask, wdata_sh;

  assign idx  = req_addr[AW+2:3];
  assign off  = req_addr[2:0];
  assign word = mem[idx];

  always_comb begin
    shifted = word >> {off, 3'b000};
    unique case (req_size)
      3'b000:  rdata = {{56{shifted[7]}},  shifted[7:0]};
      3'b001:  rdata = {{48{shifted[15]}}, shifted[15:0]};
      3'b010:  rdata = {{32{shifted[31]}}, shifted[31:0]};
      3'b100:  rdata = {56'b0, shifted[7:0]};
      3'b101:  rdata = {48'b0, shifted[15:0]};
      3'b110:  rdata = {32'b0, shifted[31:0]};
      default: rdata = word;
    endcase
    unique case (req_size[1:0])
      2'b00:   wmask = 64'hFF;
      2'b01:   wmask = 64'hFFFF;
      2'b10:   wmask = 64'hFFFF_FFFF;
      default: wmask = '1;
    endcase
    wmask    = wmask << {off, 3'b000};
    wdata_sh = req_wdata << {off, 3'b000};
  end

  assign host_rdata = mem[host_index];

  always_ff @(posedge clk) begin
    if (req_valid && req_we)
      mem[idx] <= (word & ~wmask) | (wdata_sh & wmask);
    if (host_we && !(req_valid && req_we && host_index == idx))
      mem[host_index] <= host_wdata;
  end

endmodule
