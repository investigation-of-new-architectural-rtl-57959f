// muldiv: iterative multiply/divide unit of the execute stage (RV64M).
//
// One bit per cycle: a request is accepted in IDLE, then 64 shift-add
// (multiply) or restoring shift-subtract (divide) steps run on the operand
// magnitudes, and the sign is applied at the end. resp_valid is high for one
// cycle, XLEN+1 cycles after the request was accepted; the core holds the
// instruction in the execute stage (a stall) until then. Operands, op and
// word are sampled when the request is accepted; busy is high from the cycle
// after acceptance up to and including the resp_valid cycle, and requests are
// ignored meanwhile.
//
// Supports MUL, MULH, MULHSU, MULHU, DIV, DIVU, REM, REMU and, with word=1,
// MULW, DIVW, DIVUW, REMW, REMUW. Division by zero and signed overflow give
// the results the RISC-V specification defines. The algorithm and its
// one-bit-per-cycle rate are this design's choice.
module muldiv
  import fusion_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid,
  input  md_op_e          op,
  input  logic            word,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic            busy,
  output logic            resp_valid,
  output logic [XLEN-1:0] result
);

  typedef enum logic [1:0] { S_IDLE, S_BUSY, S_DONE } state_e;
  state_e state;

  logic [6:0]        count;
  logic              is_div, neg_res, want_hi, want_rem, r_word, b_zero;
  logic [2*XLEN-1:0] acc;       // product, or {remainder, quotient} for divide
  logic [XLEN-1:0]   opb;       // multiplicand / divisor magnitude
  logic [XLEN-1:0]   res_q;

  // Operand preparation
  logic [XLEN-1:0] ea, eb, ma, mb;
  logic            sa, sb, a_signed, b_signed, div_op;

  always_comb begin
    div_op   = (op inside {MD_DIV, MD_DIVU, MD_REM, MD_REMU});
    a_signed = (op inside {MD_MULH, MD_MULHSU, MD_DIV, MD_REM});
    b_signed = (op inside {MD_MULH, MD_DIV, MD_REM});
    if (word) begin
      ea = a_signed || (op == MD_MUL) ? {{32{a[31]}}, a[31:0]} : {32'b0, a[31:0]};
      eb = b_signed || (op == MD_MUL) ? {{32{b[31]}}, b[31:0]} : {32'b0, b[31:0]};
    end else begin
      ea = a;
      eb = b;
    end
    sa = a_signed && ea[XLEN-1];
    sb = b_signed && eb[XLEN-1];
    ma = sa ? -ea : ea;
    mb = sb ? -eb : eb;
  end

  // One iteration step
  logic [XLEN:0]     rem_shift, rem_sub;
  always_comb begin
    rem_shift = {acc[2*XLEN-1:XLEN], acc[XLEN-1]};
    rem_sub   = rem_shift - {1'b0, opb};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      count    <= '0;
      acc      <= '0;
      opb      <= '0;
      is_div   <= 1'b0;
      neg_res  <= 1'b0;
      want_hi  <= 1'b0;
      want_rem <= 1'b0;
      r_word   <= 1'b0;
      b_zero   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (req_valid) begin
          state    <= S_BUSY;
          count    <= '0;
          is_div   <= div_op;
          want_hi  <= (op inside {MD_MULH, MD_MULHSU, MD_MULHU});
          want_rem <= (op inside {MD_REM, MD_REMU});
          r_word   <= word;
          b_zero   <= (eb == '0);
          opb      <= div_op ? mb : ma;
          // multiply: acc = {0, multiplier}; divide: acc = {0, dividend}
          acc      <= {{XLEN{1'b0}}, div_op ? ma : mb};
          if (op inside {MD_REM, MD_REMU}) neg_res <= sa;
          else                             neg_res <= sa ^ sb;
        end
        S_BUSY: begin
          if (is_div) begin
            // restoring division: shift in the next dividend bit
            if (!rem_sub[XLEN])
              acc <= {rem_sub[XLEN-1:0], acc[XLEN-2:0], 1'b1};
            else
              acc <= {rem_shift[XLEN-1:0], acc[XLEN-2:0], 1'b0};
          end else begin
            // shift-add multiplication, multiplier in the low half
            logic [XLEN:0] sum;
            sum = {1'b0, acc[2*XLEN-1:XLEN]} + (acc[0] ? {1'b0, opb} : '0);
            acc <= {sum, acc[XLEN-1:1]};
          end
          count <= count + 7'd1;
          if (count == 7'(XLEN - 1)) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Result selection and sign fix-up
  logic [2*XLEN-1:0] prod;
  logic [XLEN-1:0]   quo, rem;
  always_comb begin
    prod = neg_res ? -acc : acc;
    quo  = (neg_res && !b_zero) ? -acc[XLEN-1:0] : acc[XLEN-1:0];
    rem  = neg_res ? -acc[2*XLEN-1:XLEN] : acc[2*XLEN-1:XLEN];
    if (is_div) res_q = want_rem ? rem : quo;
    else        res_q = want_hi ? prod[2*XLEN-1:XLEN] : prod[XLEN-1:0];
    result = r_word ? {{32{res_q[31]}}, res_q[31:0]} : res_q;
  end

  assign busy       = (state != S_IDLE);
  assign resp_valid = (state == S_DONE);

endmodule
