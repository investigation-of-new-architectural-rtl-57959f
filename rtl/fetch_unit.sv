// fetch_unit: the fetch stage - program counter, next-PC selection and the
// fetch-to-decode instruction register.
//
// Every cycle the instruction memory returns two words, at PC and PC + 4. A
// predecoder compares the opcode of the first word with the two 8-byte fused
// opcodes (LUI-fused, AUIPC-fused); on a match the fused control signal
// fetch2 is raised, both words go to decode together and the PC advances by 8
// instead of 4. Otherwise only the first word is used and the PC advances by 4
// (the second word is still passed along but ignored by decode).
//
// Control: redirect (taken branch or jump resolved in the execute stage)
// loads the target and squashes the word in the decode register; stall holds
// the PC and the decode register (decode-stage interlock); enable = 0 stops
// fetching new work (after a halt instruction) and inserts bubbles.
// Timing: one instruction (4 or 8 bytes) per cycle; the decode register is
// updated at the clock edge.
module fetch_unit
  import fusion_pkg::*;
#(
  parameter logic [63:0] RESET_PC = 64'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        stall,
  input  logic        redirect,
  input  logic [63:0] redirect_pc,
  // instruction memory
  output logic [63:0] fetch_addr,
  input  logic [31:0] fetch_word0,
  input  logic [31:0] fetch_word1,
  // decode-stage register
  output logic        id_valid,
  output logic [63:0] id_pc,
  output logic [31:0] id_inst,
  output logic [31:0] id_inst2,
  output logic        id_fetch2
);

  logic [63:0] pc;
  logic        fetch2;

  assign fetch_addr = pc;
  assign fetch2     = (fetch_word0[6:0] == OP_FUSED_LUI) ||
                      (fetch_word0[6:0] == OP_FUSED_AUIPC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= RESET_PC;
      id_valid  <= 1'b0;
      id_pc     <= '0;
      id_inst   <= '0;
      id_inst2  <= '0;
      id_fetch2 <= 1'b0;
    end else if (redirect) begin
      pc       <= redirect_pc;
      id_valid <= 1'b0;
    end else if (!stall) begin
      if (enable) begin
        pc        <= pc + (fetch2 ? 64'd8 : 64'd4);
        id_valid  <= 1'b1;
        id_pc     <= pc;
        id_inst   <= fetch_word0;
        id_inst2  <= fetch_word1;
        id_fetch2 <= fetch2;
      end else begin
        id_valid  <= 1'b0;
      end
    end
  end

endmodule
