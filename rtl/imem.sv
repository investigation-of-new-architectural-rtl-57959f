// imem: instruction memory that returns two consecutive instruction words per
// cycle.
//
// Stands in the place of the level-1 instruction cache. Each cycle it returns,
// combinationally, the 32-bit words at byte address fetch_addr and
// fetch_addr + 4, so that an 8-byte fused LUI/AUIPC instruction is fetched in
// one cycle and the PC can advance by 8. A write port, used to load the
// program before the core runs, writes one 32-bit word at the clock edge.
// The memory is a plain word array (no tags, no misses): the cache hierarchy
// itself is not part of this design. Addresses wrap modulo the memory size.
module imem #(
  parameter int WORDS = 4096   // 16 KiB
) (
  input  logic                     clk,
  input  logic [63:0]              fetch_addr,
  output logic [31:0]              fetch_word0,
  output logic [31:0]              fetch_word1,
  input  logic                     wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_index,
  input  logic [31:0]              wr_data
);

  localparam int AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] idx0, idx1;

  assign idx0 = fetch_addr[AW+1:2];
  assign idx1 = idx0 + AW'(1);

  assign fetch_word0 = mem[idx0];
  assign fetch_word1 = mem[idx1];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_index] <= wr_data;
  end

endmodule
