// fusion_soc: top level - the fused-instruction RV64IM core with its
// instruction and data memories.
//
// The core (fusion_core) fetches two instruction words per cycle from imem
// and accesses dmem in its memory stage; both memories are single-cycle
// arrays in place of the level-1 caches. The program is written into imem
// through the prog_* port while the core is held in reset (rst_n = 0), and
// data can be preloaded or inspected through the host_* port of dmem. After
// rst_n rises the core runs from RESET_PC until an ECALL/EBREAK (or an
// unsupported instruction) retires, then raises halted; perf holds the cycle,
// retired-instruction and event counts. A retire trace of the write-back
// stage is brought out for checking.
module fusion_soc
  import fusion_pkg::*;
#(
  parameter int          IMEM_WORDS  = 4096,   // 16 KiB
  parameter int          DMEM_DWORDS = 2048,   // 16 KiB
  parameter logic [63:0] RESET_PC    = 64'h0
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // program load
  input  logic                           prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0]  prog_index,
  input  logic [31:0]                    prog_data,
  // data memory host port
  input  logic                           host_we,
  input  logic [$clog2(DMEM_DWORDS)-1:0] host_index,
  input  logic [63:0]                    host_wdata,
  output logic [63:0]                    host_rdata,
  // retire trace
  output logic                           retire_valid,
  output logic [63:0]                    retire_pc,
  output logic [31:0]                    retire_inst,
  output logic                           retire_we,
  output logic [4:0]                     retire_rd,
  output logic [63:0]                    retire_wdata,
  // status
  output logic                           halted,
  output logic                           illegal,
  output perf_t                          perf
);

  logic [63:0] imem_addr;
  logic [31:0] imem_word0, imem_word1;
  logic        dmem_valid, dmem_we;
  logic [2:0]  dmem_size;
  logic [63:0] dmem_addr, dmem_wdata, dmem_rdata;

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk,
    .fetch_addr  (imem_addr),
    .fetch_word0 (imem_word0),
    .fetch_word1 (imem_word1),
    .wr_en       (prog_we),
    .wr_index    (prog_index),
    .wr_data     (prog_data)
  );

  dmem #(.DWORDS(DMEM_DWORDS)) u_dmem (
    .clk,
    .req_valid  (dmem_valid),
    .req_we     (dmem_we),
    .req_size   (dmem_size),
    .req_addr   (dmem_addr),
    .req_wdata  (dmem_wdata),
    .rdata      (dmem_rdata),
    .host_we, .host_index, .host_wdata, .host_rdata
  );

  fusion_core #(.RESET_PC(RESET_PC)) u_core (
    .clk, .rst_n,
    .imem_addr, .imem_word0, .imem_word1,
    .dmem_valid, .dmem_we, .dmem_size, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .retire_valid, .retire_pc, .retire_inst, .retire_we, .retire_rd, .retire_wdata,
    .halted, .illegal, .perf
  );

endmodule
