// tb_data_memory: writes random words to random addresses with the write
// enable on and off, and checks every read against a shadow array kept by
// the testbench. All 256 locations are written first so none is read before
// it holds a known value.
module tb_data_memory;
  int checks = 0, failures = 0;
  logic        clk = 0, we;
  logic [7:0]  addr;
  logic [15:0] wdata, rdata;
  logic [15:0] shadow [256];

  data_memory dut (.clk(clk), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1; addr = 8'(a); wdata = 16'($urandom);
      shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); #1;
      checks++;
      if (rdata !== shadow[a]) begin failures++; $display("FAIL addr %h: %h exp %h", a, rdata, shadow[a]); end
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we = 1'($urandom % 2); addr = 8'($urandom); wdata = 16'($urandom);
      @(posedge clk);
      if (we) shadow[addr] = wdata;
      @(negedge clk);
      we = 0;
      addr = 8'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[addr]) begin failures++; $display("FAIL addr %h: %h exp %h", addr, rdata, shadow[addr]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
