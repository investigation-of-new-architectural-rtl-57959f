// tb_muldiv: self-checking test of the iterative multiply/divide unit. Every
// operation, 64-bit and word forms, with random and corner operands
// (zero divisor, most negative value by -1), compared with the reference
// model's arithmetic; the answer must arrive exactly XLEN + 1 cycles after the
// request is first presented.
module tb_muldiv;
  import fusion_pkg::*;
  import tb_rv_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        req_valid, word, busy, resp_valid;
  md_op_e      op;
  logic [63:0] a, b, result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  muldiv dut (.*);

  function automatic logic [63:0] pick();
    case ($urandom_range(0, 7))
      0: return 64'h8000_0000_0000_0000;
      1: return '1;
      2: return '0;
      3: return {32'hFFFF_FFFF, 32'h8000_0000};
      4: return 64'($urandom_range(0, 9));
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    req_valid = 0; op = MD_MUL; word = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      int lat;
      logic [63:0] e;
      @(negedge clk);
      op = md_op_e'($urandom_range(0, 7));
      word = (op == MD_MUL || op inside {MD_DIV, MD_DIVU, MD_REM, MD_REMU}) ? 1'($urandom) : 1'b0;
      a = pick(); b = pick();
      req_valid = 1;
      e = rv_ref::muldiv(3'(op), word, a, b);
      lat = 0;
      do begin
        @(posedge clk); #1; lat++;
      end while (!resp_valid && lat < 200);
      checks++;
      if (result !== e) begin
        failures++;
        if (failures < 10) $display("FAIL: op=%s w=%0b a=%h b=%h got %h exp %h", op.name(), word, a, b, result, e);
      end
      checks++;
      if (lat != XLEN + 1) begin
        failures++;
        $display("FAIL: latency %0d", lat);
      end
      @(posedge clk);  // the requester takes the answer and drops the request
      req_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
