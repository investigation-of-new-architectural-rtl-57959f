// tb_dmem: self-checking test of the data memory: random stores of every
// width and loads of every width and signedness at aligned addresses,
// against a byte model kept here; host-port writes and reads are mixed in.
module tb_dmem;
  localparam int DWORDS = 64;
  logic        clk = 0;
  logic        req_valid, req_we, host_we;
  logic [2:0]  req_size;
  logic [63:0] req_addr, req_wdata, rdata, host_wdata, host_rdata;
  logic [5:0]  host_index;
  logic [7:0]  model [DWORDS * 8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dmem #(.DWORDS(DWORDS)) dut (.*);

  function automatic logic [63:0] mload(int addr, logic [2:0] sz);
    logic [63:0] v;
    int n;
    n = 1 << sz[1:0];
    v = '0;
    for (int i = 0; i < n; i++) v[i*8 +: 8] = model[addr + i];
    if (!sz[2] && n < 8 && v[n*8-1]) for (int i = n * 8; i < 64; i++) v[i] = 1'b1;
    return v;
  endfunction

  initial begin
    req_valid = 0; req_we = 0; host_we = 0; req_size = 0; req_addr = 0; req_wdata = 0;
    host_index = 0; host_wdata = 0;
    for (int i = 0; i < DWORDS; i++) begin
      @(negedge clk);
      host_we = 1; host_index = 6'(i); host_wdata = {$urandom, $urandom};
      for (int j = 0; j < 8; j++) model[i*8 + j] = host_wdata[j*8 +: 8];
    end
    @(negedge clk);
    host_we = 0;
    for (int i = 0; i < 4000; i++) begin
      int n, addr;
      @(negedge clk);
      req_size = 3'($urandom_range(0, 6));
      n = 1 << req_size[1:0];
      addr = $urandom_range(0, DWORDS * 8 / n - 1) * n;
      req_addr = 64'(addr);
      req_valid = 1;
      req_we = ($urandom_range(0, 2) == 0) && !req_size[2];
      req_wdata = {$urandom, $urandom};
      host_index = 6'($urandom);
      #1;
      if (!req_we) begin
        checks++;
        if (rdata !== mload(addr, req_size)) begin
          failures++;
          if (failures < 10) $display("FAIL: load %h size %0d got %h exp %h", req_addr, req_size, rdata, mload(addr, req_size));
        end
      end
      checks++;
      if (host_rdata !== mload(int'(host_index) * 8, 3'd3)) begin
        failures++;
        if (failures < 10) $display("FAIL: host read %0d", host_index);
      end
      @(posedge clk);
      if (req_we) for (int j = 0; j < n; j++) model[addr + j] = req_wdata[j*8 +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
