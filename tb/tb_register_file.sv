// tb_register_file: checks the constant registers (R0 reads 0, R1 reads 1,
// writes to them ignored), write/read-back of R2-R15 through both read ports,
// that nothing is written while the write enable is 0, and that reset clears
// R2-R15. Expected contents come from a shadow array kept by the testbench.
module tb_register_file;
  int checks = 0, failures = 0;
  logic        clk = 0, reset, we;
  logic [3:0]  ra1, ra2, wa;
  logic [15:0] rd1, rd2, wd;
  logic [15:0] shadow [16];

  register_file dut (.clk(clk), .reset(reset), .raddr1(ra1), .raddr2(ra2),
                     .rdata1(rd1), .rdata2(rd2), .we(we), .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] expect_reg(input int r);
    if (r == 0) return 16'd0;
    if (r == 1) return 16'd1;
    return shadow[r];
  endfunction

  task automatic check_all();
    for (int r = 0; r < 16; r++) begin
      ra1 = 4'(r); ra2 = 4'(15 - r);
      #1;
      checks += 2;
      if (rd1 !== expect_reg(r)) begin failures++; $display("FAIL port1 R%0d=%h exp %h", r, rd1, expect_reg(r)); end
      if (rd2 !== expect_reg(15 - r)) begin failures++; $display("FAIL port2 R%0d=%h exp %h", 15 - r, rd2, expect_reg(15 - r)); end
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    foreach (shadow[i]) shadow[i] = 16'h0;
    reset = 1;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    check_all();
    for (int round = 0; round < 20; round++) begin
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        we = ($urandom % 4) != 0;
        wa = 4'($urandom);
        wd = 16'($urandom);
        @(posedge clk);
        if (we && wa > 1) shadow[wa] = wd;
      end
      @(negedge clk);
      we = 0;
      check_all();
    end
    // writes aimed at R0 and R1 must be ignored
    @(negedge clk); we = 1; wa = 0; wd = 16'hBEEF;
    @(negedge clk); wa = 1; wd = 16'hCAFE;
    @(negedge clk); we = 0;
    check_all();
    // reset clears the general-purpose registers
    reset = 1; #2 reset = 0;
    foreach (shadow[i]) shadow[i] = 16'h0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
