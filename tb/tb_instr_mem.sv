// tb_instr_mem: loads every address through the active-low write strobe,
// reads everything back with the output enabled, checks that a write with the
// strobe high changes nothing, and that the output reads 0 when disabled.
module tb_instr_mem;
  int checks = 0, failures = 0;
  logic        clk = 0, oe_n, we_n;
  logic [7:0]  addr;
  logic [15:0] din, dout;
  logic [15:0] shadow [256];

  instr_mem dut (.clk(clk), .addr(addr), .oe_n(oe_n), .we_n(we_n), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    oe_n = 0; we_n = 1; addr = 0; din = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we_n = 0; addr = 8'(a); din = 16'($urandom);
      shadow[a] = din;
    end
    @(negedge clk); we_n = 1;
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); #1;
      checks++;
      if (dout !== shadow[a]) begin failures++; $display("FAIL addr %h: %h exp %h", a, dout, shadow[a]); end
    end
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      we_n = 1'($urandom % 2); addr = 8'($urandom); din = 16'($urandom);
      @(posedge clk);
      if (!we_n) shadow[addr] = din;
      @(negedge clk);
      we_n = 1; addr = 8'($urandom); oe_n = ($urandom % 8) == 0;
      #1;
      checks++;
      if (dout !== (oe_n ? 16'h0 : shadow[addr])) begin
        failures++; $display("FAIL addr %h oe_n %b: %h", addr, oe_n, dout);
      end
      oe_n = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
