// fusion_core: five-stage in-order RV64IM pipeline with fused-instruction
// support.
//
// Stages: fetch (F), decode (D), execute (X), memory (M), write-back (W), one
// instruction per cycle when nothing stalls. The ordinary RV64IM datapath is
// a classic in-order pipeline; the additions for instruction fusion are:
//   * fetch of two words per cycle and a PC step of 8 for the 8-byte LUI/AUIPC
//     idioms (fetch_unit);
//   * fused control signals in the decoder (fused_decoder);
//   * a 12-bit execute-stage register (ex_imm12) holding the low immediate of
//     the second fetched word, and an immediate unit that appends it to the
//     upper 20 bits (imm_gen);
//   * a second ALU in the memory stage with an operand mux, a sign extension
//     unit and a bypass mux (second_alu), feeding the write-back data mux.
// How each fused instruction flows:
//   LEA      X: rs1 << shamt (ALU)      M: + rs2 (second ALU)
//   IDXLD    X: rs1 + rs2 (ALU)         M: load from that address
//   CUW      X: rs1 << imm (ALU)        M: >> imm (second ALU)
//   LUI+op   X: 0  + imm32 (ALU)        M: result, or load from it
//   AUIPC+op X: PC + imm32 (ALU)        M: result, or load from it
//
// Hazards (this design's own choices): operands are forwarded into the
// execute stage from the memory-stage ALU result and from the write-back
// register; an instruction whose result is only ready at the end of the memory
// stage (loads, LEA, CUW) causes a one-cycle decode interlock if the next
// instruction needs it. Branches and jumps resolve in the execute stage and
// redirect fetch, squashing the two younger instructions (static not-taken
// prediction). MUL/DIV holds the execute stage until the iterative unit
// answers. ECALL/EBREAK or an unsupported instruction halts the core when it
// retires; no CSR file, traps, FPU, coprocessor or virtual memory.
//
// Interfaces: instruction memory fetch port (address out, two words in), data
// memory port (request out, load data in, combinational), a retire trace, the
// halt/illegal flags and the event counters (perf).
module fusion_core
  import fusion_pkg::*;
#(
  parameter logic [63:0] RESET_PC = 64'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic [63:0] imem_addr,
  input  logic [31:0] imem_word0,
  input  logic [31:0] imem_word1,
  // data memory
  output logic        dmem_valid,
  output logic        dmem_we,
  output logic [2:0]  dmem_size,
  output logic [63:0] dmem_addr,
  output logic [63:0] dmem_wdata,
  input  logic [63:0] dmem_rdata,
  // retire trace (write-back stage)
  output logic        retire_valid,
  output logic [63:0] retire_pc,
  output logic [31:0] retire_inst,
  output logic        retire_we,
  output logic [4:0]  retire_rd,
  output logic [63:0] retire_wdata,
  // status
  output logic        halted,
  output logic        illegal,
  output perf_t       perf
);

  // ------------------------------------------------------------------
  // Fetch
  // ------------------------------------------------------------------
  logic        id_valid, id_fetch2;
  logic [63:0] id_pc;
  logic [31:0] id_inst, id_inst2;
  logic        fetch_en, stall_d, redirect;
  logic [63:0] redirect_pc;

  fetch_unit #(.RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n,
    .enable      (fetch_en),
    .stall       (stall_d),
    .redirect    (redirect),
    .redirect_pc (redirect_pc),
    .fetch_addr  (imem_addr),
    .fetch_word0 (imem_word0),
    .fetch_word1 (imem_word1),
    .id_valid, .id_pc, .id_inst, .id_inst2, .id_fetch2
  );

  // ------------------------------------------------------------------
  // Decode
  // ------------------------------------------------------------------
  ctrl_t       id_ctrl;
  logic [4:0]  id_rs1, id_rs2, id_rd;
  logic [63:0] id_rs1_val, id_rs2_val;
  logic        id_stop;

  fused_decoder u_dec (.inst(id_inst), .inst2(id_inst2), .ctrl(id_ctrl));

  assign id_rs1  = id_inst[19:15];
  assign id_rs2  = id_inst[24:20];
  assign id_rd   = id_inst[11:7];
  assign id_stop = id_valid && (id_ctrl.halt || !id_ctrl.legal);

  // Write-back port
  logic        wb_valid, wb_wen, wb_halt, wb_illegal, wb_fused, wb_fetch2;
  logic [4:0]  wb_rd;
  logic [63:0] wb_wdata, wb_pc;
  logic [31:0] wb_inst;

  regfile u_rf (
    .clk, .rst_n,
    .raddr1 (id_rs1),
    .raddr2 (id_rs2),
    .rdata1 (id_rs1_val),
    .rdata2 (id_rs2_val),
    .we     (wb_valid && wb_wen),
    .waddr  (wb_rd),
    .wdata  (wb_wdata)
  );

  // ------------------------------------------------------------------
  // Execute-stage registers
  // ------------------------------------------------------------------
  logic        ex_valid;
  ctrl_t       ex_ctrl;
  logic [63:0] ex_pc, ex_rs1_reg, ex_rs2_reg;
  logic [31:0] ex_inst;
  logic [11:0] ex_imm12;     // low immediate of an 8-byte fused instruction
  logic [4:0]  ex_rs1, ex_rs2, ex_rd;
  logic        ex_stop;

  // Memory-stage registers
  logic        mem_valid;
  ctrl_t       mem_ctrl;
  logic [63:0] mem_pc, mem_wdata, mem_rs2;
  logic [31:0] mem_inst;
  logic [4:0]  mem_rd;
  logic        mem_stop;

  // Load-use style interlock: the instruction in X produces its result only
  // at the end of M (load, LEA, clear upper word).
  logic ex_late, load_use, md_stall;
  assign ex_late  = ex_ctrl.load || (ex_ctrl.alu2_op != ALU2_NONE);
  assign load_use = id_valid && ex_valid && ex_late && ex_ctrl.wen && (ex_rd != 5'd0) &&
                    ((id_ctrl.rs1_used && id_rs1 == ex_rd) ||
                     (id_ctrl.rs2_used && id_rs2 == ex_rd));

  // ------------------------------------------------------------------
  // Execute
  // ------------------------------------------------------------------
  logic [63:0] ex_rs1_val, ex_rs2_val, ex_imm, alu_a, alu_b, alu_y, ex_result;
  logic        fwd1_mem, fwd2_mem, fwd1_wb, fwd2_wb;
  logic        mem_fwd_ok, wb_fwd_ok;

  assign mem_fwd_ok = mem_valid && mem_ctrl.wen && (mem_rd != 5'd0);
  assign wb_fwd_ok  = wb_valid && wb_wen && (wb_rd != 5'd0);
  assign fwd1_mem   = ex_ctrl.rs1_used && mem_fwd_ok && (mem_rd == ex_rs1);
  assign fwd2_mem   = ex_ctrl.rs2_used && mem_fwd_ok && (mem_rd == ex_rs2);
  assign fwd1_wb    = ex_ctrl.rs1_used && !fwd1_mem && wb_fwd_ok && (wb_rd == ex_rs1);
  assign fwd2_wb    = ex_ctrl.rs2_used && !fwd2_mem && wb_fwd_ok && (wb_rd == ex_rs2);

  // Bypass muxes
  assign ex_rs1_val = fwd1_mem ? mem_wdata : fwd1_wb ? wb_wdata : ex_rs1_reg;
  assign ex_rs2_val = fwd2_mem ? mem_wdata : fwd2_wb ? wb_wdata : ex_rs2_reg;

  imm_gen u_imm (.inst(ex_inst), .imm12(ex_imm12), .sel(ex_ctrl.imm), .imm(ex_imm));

  always_comb begin
    unique case (ex_ctrl.op1)
      A1_PC:   alu_a = ex_pc;
      A1_ZERO: alu_a = '0;
      default: alu_a = ex_rs1_val;
    endcase
    unique case (ex_ctrl.op2)
      A2_IMM:  alu_b = ex_imm;
      A2_FOUR: alu_b = 64'd4;
      default: alu_b = ex_rs2_val;
    endcase
  end

  alu u_alu (.op(ex_ctrl.alu_op), .word(ex_ctrl.word), .a(alu_a), .b(alu_b), .y(alu_y));

  logic        md_resp;
  logic [63:0] md_result;
  logic        md_busy;

  muldiv u_md (
    .clk, .rst_n,
    .req_valid  (ex_valid && !ex_stop && ex_ctrl.muldiv),
    .op         (ex_ctrl.md_op),
    .word       (ex_ctrl.word),
    .a          (ex_rs1_val),
    .b          (ex_rs2_val),
    .busy       (md_busy),
    .resp_valid (md_resp),
    .result     (md_result)
  );

  assign md_stall  = ex_valid && !ex_stop && ex_ctrl.muldiv && !md_resp;
  assign ex_result = ex_ctrl.muldiv ? md_result : alu_y;

  // Branch resolution
  logic br_taken;
  always_comb begin
    unique case (ex_inst[14:12])
      3'b000:  br_taken = (ex_rs1_val == ex_rs2_val);
      3'b001:  br_taken = (ex_rs1_val != ex_rs2_val);
      3'b100:  br_taken = ($signed(ex_rs1_val) <  $signed(ex_rs2_val));
      3'b101:  br_taken = ($signed(ex_rs1_val) >= $signed(ex_rs2_val));
      3'b110:  br_taken = (ex_rs1_val <  ex_rs2_val);
      default: br_taken = (ex_rs1_val >= ex_rs2_val);
    endcase
  end

  assign redirect = ex_valid && !ex_stop && (ex_ctrl.jal || ex_ctrl.jalr || (ex_ctrl.branch && br_taken));
  assign redirect_pc = ex_ctrl.jalr ? ((ex_rs1_val + ex_imm) & ~64'd1) : (ex_pc + ex_imm);

  // Stall and fetch control
  logic halt_pending;
  assign stall_d  = md_stall || load_use;
  assign fetch_en = !halt_pending && !id_stop && !halted;

  // ------------------------------------------------------------------
  // Pipeline registers
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid     <= 1'b0;
      ex_ctrl      <= '0;
      ex_pc        <= '0;
      ex_inst      <= '0;
      ex_imm12     <= '0;
      ex_rs1       <= '0;
      ex_rs2       <= '0;
      ex_rd        <= '0;
      ex_rs1_reg   <= '0;
      ex_rs2_reg   <= '0;
      ex_stop      <= 1'b0;
      halt_pending <= 1'b0;
    end else if (!md_stall) begin
      if (!id_valid || load_use || redirect || halt_pending) begin
        ex_valid <= 1'b0;
      end else begin
        ex_valid     <= 1'b1;
        ex_ctrl      <= id_ctrl;
        ex_pc        <= id_pc;
        ex_inst      <= id_inst;
        ex_imm12     <= id_inst2[31:20];
        ex_rs1       <= id_rs1;
        ex_rs2       <= id_rs2;
        ex_rd        <= id_rd;
        ex_rs1_reg   <= id_rs1_val;
        ex_rs2_reg   <= id_rs2_val;
        ex_stop      <= id_stop;
        halt_pending <= id_stop;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_valid <= 1'b0;
      mem_ctrl  <= '0;
      mem_pc    <= '0;
      mem_inst  <= '0;
      mem_rd    <= '0;
      mem_wdata <= '0;
      mem_rs2   <= '0;
      mem_stop  <= 1'b0;
    end else begin
      mem_valid <= ex_valid && !md_stall;
      mem_ctrl  <= ex_ctrl;
      mem_pc    <= ex_pc;
      mem_inst  <= ex_inst;
      mem_rd    <= ex_rd;
      mem_wdata <= ex_result;
      mem_rs2   <= ex_rs2_val;
      mem_stop  <= ex_stop;
    end
  end

  // ------------------------------------------------------------------
  // Memory stage: data memory and second ALU
  // ------------------------------------------------------------------
  logic [63:0] alu2_y, mem_result;

  assign dmem_valid = mem_valid && !mem_stop && (mem_ctrl.load || mem_ctrl.store);
  assign dmem_we    = dmem_valid && mem_ctrl.store;
  assign dmem_size  = mem_ctrl.mem_size;
  assign dmem_addr  = mem_wdata;
  assign dmem_wdata = mem_rs2;

  second_alu u_alu2 (
    .op       (mem_ctrl.alu2_op),
    .use_imm  (mem_ctrl.alu2_imm),
    .alu1_out (mem_wdata),
    .rs2      (mem_rs2),
    .mem_inst (mem_inst),
    .y        (alu2_y)
  );

  // Write-back data mux
  assign mem_result = mem_ctrl.load ? dmem_rdata : alu2_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid   <= 1'b0;
      wb_wen     <= 1'b0;
      wb_rd      <= '0;
      wb_wdata   <= '0;
      wb_pc      <= '0;
      wb_inst    <= '0;
      wb_halt    <= 1'b0;
      wb_illegal <= 1'b0;
      wb_fused   <= 1'b0;
      wb_fetch2  <= 1'b0;
    end else begin
      wb_valid   <= mem_valid;
      wb_wen     <= mem_ctrl.wen && !mem_stop;
      wb_rd      <= mem_rd;
      wb_wdata   <= mem_result;
      wb_pc      <= mem_pc;
      wb_inst    <= mem_inst;
      wb_halt    <= mem_stop;
      wb_illegal <= mem_stop && !mem_ctrl.legal;
      wb_fused   <= mem_ctrl.fused;
      wb_fetch2  <= mem_ctrl.fetch2;
    end
  end

  // ------------------------------------------------------------------
  // Write-back: retire trace, halt and counters
  // ------------------------------------------------------------------
  assign retire_valid = wb_valid;
  assign retire_pc    = wb_pc;
  assign retire_inst  = wb_inst;
  assign retire_we    = wb_valid && wb_wen && (wb_rd != 5'd0);
  assign retire_rd    = wb_rd;
  assign retire_wdata = wb_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      halted  <= 1'b0;
      illegal <= 1'b0;
      perf    <= '0;
    end else if (!halted) begin
      if (wb_valid && wb_halt) begin
        halted  <= 1'b1;
        illegal <= wb_illegal;
      end
      perf.cycles     <= perf.cycles + 64'd1;
      perf.instret    <= perf.instret + 64'(wb_valid);
      perf.fused      <= perf.fused + 64'(wb_valid && wb_fused);
      perf.fetch2     <= perf.fetch2 + 64'(wb_valid && wb_fetch2);
      perf.load_use   <= perf.load_use + 64'(load_use && !md_stall && !redirect);
      perf.md_stall   <= perf.md_stall + 64'(md_stall);
      perf.redirect   <= perf.redirect + 64'(redirect);
      perf.bypass_mem <= perf.bypass_mem + 64'(ex_valid && (fwd1_mem || fwd2_mem));
      perf.bypass_wb  <= perf.bypass_wb + 64'(ex_valid && (fwd1_wb || fwd2_wb));
    end
  end

  // The memory stage must never see an instruction whose result is not ready
  // when a younger instruction in execute consumes it.
  assert property (@(posedge clk) disable iff (!rst_n)
    !(ex_valid && mem_valid && mem_ctrl.wen && (mem_rd != 5'd0) &&
      (mem_ctrl.load || mem_ctrl.alu2_op != ALU2_NONE) && (fwd1_mem || fwd2_mem)))
    else $error("operand forwarded from a memory-stage result that is not ready");

  // Fetch and decode must agree on the length of every legal instruction.
  assert property (@(posedge clk) disable iff (!rst_n)
    (id_valid && id_ctrl.legal) |-> (id_fetch2 == id_ctrl.fetch2))
    else $error("fetch length disagrees with the decoded instruction");

  // A MUL/DIV result is only taken from an operation in progress.
  assert property (@(posedge clk) disable iff (!rst_n) md_resp |-> md_busy)
    else $error("MUL/DIV response without a request");

endmodule
