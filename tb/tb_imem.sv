// tb_imem: self-checking test of the two-word instruction memory: random
// words are written through the write port, then every fetch address must
// return the word there and the next one, wrapping at the end.
module tb_imem;
  localparam int WORDS = 256;
  logic        clk = 0;
  logic [63:0] fetch_addr;
  logic [31:0] fetch_word0, fetch_word1, wr_data;
  logic        wr_en;
  logic [7:0]  wr_index;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  imem #(.WORDS(WORDS)) dut (.*);

  initial begin
    wr_en = 0; fetch_addr = 0; wr_index = 0; wr_data = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      wr_en = 1; wr_index = 8'(i); wr_data = $urandom; model[i] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int i = 0; i < 2000; i++) begin
      int k;
      k = $urandom_range(0, WORDS - 1);
      fetch_addr = 64'(4 * k) + (64'($urandom_range(0, 3)) * 64'(4 * WORDS));
      #1;
      checks++;
      if (fetch_word0 !== model[k] || fetch_word1 !== model[(k + 1) % WORDS]) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %h got %h %h", fetch_addr, fetch_word0, fetch_word1);
      end
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
