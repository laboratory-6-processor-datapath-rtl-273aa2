// tb_cpu: drives the processor's instruction input directly and compares, on
// every cycle, its pins (Read Data 1/2, ALU result, Zero) and the next PC with
// the instruction-level reference model. The stream is a prologue that stores
// each address's own value into all 256 data-memory words (SW R2,0(R2);
// ADD R1,R2,R2), then random instructions of all eight kinds, with BEQ Rs,Rs
// mixed in so that taken branches occur, then a read-out of every register.
// Each instruction must complete in one clock cycle.
module tb_cpu;
  import hw_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, reset;
  logic [15:0] instr;
  logic [7:0]  pc;
  logic [15:0] rd1, rd2, alu_res;
  logic        zero;
  hw_model     m;

  cpu dut (.clk(clk), .reset(reset), .instr(instr), .pc(pc), .rf_rdata1(rd1),
           .rf_rdata2(rd2), .alu_result(alu_res), .zero(zero));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp,
                       input logic [15:0] ins);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s instr=%h pc=%h got=%h exp=%h", what, ins, pc, got, exp);
    end
  endtask

  task automatic execute(input logic [15:0] ins);
    pins_t p;
    instr = ins;
    #1;
    check("pc", 16'(pc), 16'(m.pc), ins);
    p = m.step(ins);
    check("rd1", rd1, p.rd1, ins);
    check("rd2", rd2, p.rd2, ins);
    if (p.alu_known) begin
      check("alu", alu_res, p.alu, ins);
      check("zero", 16'(zero), 16'(p.zero), ins);
    end
    @(posedge clk); #1;
    check("next pc", 16'(pc), 16'(m.pc), ins);
    @(negedge clk);
  endtask

  function automatic logic [15:0] random_instr();
    logic [3:0] ops [8] = '{4'h0, 4'h1, 4'h2, 4'h3, 4'h4, 4'h5, 4'h7, 4'h8};
    logic [15:0] ins;
    ins = {ops[$urandom % 8], 12'($urandom)};
    if (ins[15:12] == 4'h7 && ($urandom % 2) == 1) ins[7:4] = ins[11:8];  // BEQ Rs,Rs
    return ins;
  endfunction

  initial begin
    m = new();
    instr = 16'h2000;
    reset = 1;
    repeat (2) @(posedge clk);
    #1;
    check("reset pc", 16'(pc), 16'h0, 16'h0);
    @(negedge clk) reset = 0;
    m.reset();
    for (int a = 0; a < 256; a++) begin
      execute(16'h1220);  // SW R2, 0(R2)
      execute(16'h2122);  // ADD R1, R2, R2
    end
    for (int k = 0; k < 5000; k++) execute(random_instr());
    for (int r = 0; r < 16; r++) execute({4'h2, 4'(r), 4'h0, 4'h0});  // ADD Rr, R0, R0
    $display("events: add=%0d sub=%0d and=%0d or=%0d lw=%0d sw=%0d beq_taken=%0d beq_not=%0d jmp=%0d const_write=%0d",
             m.n_add, m.n_sub, m.n_and, m.n_or, m.n_lw, m.n_sw, m.n_beq_taken,
             m.n_beq_not_taken, m.n_jmp, m.n_const_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
