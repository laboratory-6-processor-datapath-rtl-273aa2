// tb_lab6_system: end-to-end test of the whole lab setup at its default sizes.
// It follows the board's load-and-run procedure: hold reset, set LOAD = 0,
// put each address and instruction on the switches and pulse WR low, set
// LOAD = 1, release reset, then clock once per instruction.
//
// Program 1 is the lab's example (doubling to 8, storing 8 and 2, loading them
// back, 8 - 2 = 6 stored and reloaded into R15, shown on the ALU by OR, a BEQ
// back to LOOP that is not taken, then J END at 0x1E). The ALU values of its
// first twelve instructions are checked against the values in the listing's
// comments; address 0x1E holds a jump to itself so the run parks there.
// Program 2 exercises what program 1 does not: AND, taken forward and
// backward branches, and writes to the constant registers R0 and R1.
// On every cycle the displayed PC, instruction, Read Data 1/2, ALU result
// and Zero are compared with the instruction-level reference model, and each
// instruction must take exactly one clock. Each mechanism (load write, the
// four ALU instructions, LW, SW, branch taken and not taken, jump, ignored
// write to a constant register) must occur at least once.
module tb_lab6_system;
  import hw_ref_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, reset, load, wr_n;
  logic [7:0]  sw_addr;
  logic [15:0] sw_data;
  logic [7:0]  pc;
  logic [15:0] instr, rd1, rd2, alu_res;
  logic        zero;
  logic [15:0] prog [256];
  int          n_load_writes = 0;
  hw_model     m;

  lab6_system dut (.clk(clk), .reset(reset), .load(load), .wr_n(wr_n), .sw_addr(sw_addr),
                   .sw_data(sw_data), .pc(pc), .instr(instr), .rf_rdata1(rd1),
                   .rf_rdata2(rd2), .alu_result(alu_res), .zero(zero));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s pc=%h instr=%h got=%h exp=%h", what, pc, instr, got, exp);
    end
  endtask

  // Load procedure: reset held, LOAD = 0, one WR pulse per word, LOAD = 1.
  task automatic load_program(input logic [15:0] words [$], input logic [7:0] halt_addr,
                              input logic [15:0] halt_word);
    reset = 1; load = 0; wr_n = 1;
    foreach (prog[i]) prog[i] = 16'h0000;
    foreach (words[i]) prog[2 * i] = words[i];
    prog[halt_addr] = halt_word;
    for (int a = 0; a < 256; a += 2) begin
      @(negedge clk);
      sw_addr = 8'(a); sw_data = prog[a]; wr_n = 0;
      @(negedge clk);
      wr_n = 1;
      n_load_writes++;
    end
    // read the memory back through the switch address path
    for (int a = 0; a < 256; a += 2) begin
      sw_addr = 8'(a);
      #1;
      check("load readback", instr, prog[a]);
    end
    @(negedge clk);
    load = 1;
    #1;
    check("first fetch", instr, prog[0]);
    @(negedge clk);
    reset = 0;
    m.reset();
  endtask

  // Run one instruction and compare everything visible with the model.
  task automatic step(output pins_t p);
    #1;
    check("pc", 16'(pc), 16'(m.pc));
    check("instr", instr, prog[m.pc]);
    p = m.step(instr);
    check("rd1", rd1, p.rd1);
    check("rd2", rd2, p.rd2);
    if (p.alu_known) begin
      check("alu", alu_res, p.alu);
      check("zero", 16'(zero), 16'(p.zero));
    end
    @(posedge clk); #1;
    check("next pc", 16'(pc), 16'(m.pc));
    @(negedge clk);
  endtask

  initial begin
    pins_t p;
    static logic [15:0] prog1 [$] = '{
      16'h2112, 16'h2223, 16'h2333, 16'h1030, 16'h1022, 16'h0050, 16'h0042,
      16'h3545, 16'h1054, 16'h00F4, 16'h5FFF, 16'h72F9, 16'h800F};
    static logic [15:0] alu_trace [12] = '{
      16'd2, 16'd4, 16'd8, 16'd0, 16'd2, 16'd0, 16'd2, 16'd6, 16'd4, 16'd4, 16'd6, 16'hFFFC};
    static logic [15:0] prog2 [$] = '{
      16'h2112, 16'h2213, 16'h4324, 16'h5325, 16'h3515, 16'h7541, 16'h2116,
      16'h2110, 16'h1037, 16'h0017, 16'h7010, 16'h3313, 16'h734E, 16'h800D};

    m = new();
    sw_addr = 0; sw_data = 0;

    // ---- program 1: the example program ----
    load_program(prog1, 8'h1E, 16'h800F);
    // right after reset the displays show the first instruction, ADD R1,R1,R2
    #1;
    check("first pc", 16'(pc), 16'h00);
    check("first instr", instr, 16'h2112);
    check("first rd1", rd1, 16'h0001);
    check("first rd2", rd2, 16'h0001);
    check("first alu", alu_res, 16'h0002);
    check("first zero", 16'(zero), 16'h0);
    for (int i = 0; i < 12; i++) begin
      step(p);
      check("listing alu", p.alu, alu_trace[i]);
    end
    step(p);                      // J END
    check("at END", 16'(pc), 16'h1E);
    repeat (3) step(p);           // parked at END
    check("still at END", 16'(pc), 16'h1E);

    // ---- program 2: taken branches, AND, constant registers ----
    load_program(prog2, 8'h1A, 16'h800D);
    repeat (16) step(p);
    check("parked", 16'(pc), 16'h1A);

    $display("events: load_writes=%0d add=%0d sub=%0d and=%0d or=%0d lw=%0d sw=%0d beq_taken=%0d beq_not=%0d jmp=%0d const_write=%0d",
             n_load_writes, m.n_add, m.n_sub, m.n_and, m.n_or, m.n_lw, m.n_sw,
             m.n_beq_taken, m.n_beq_not_taken, m.n_jmp, m.n_const_write);
    checks++; if (n_load_writes == 0)     begin failures++; $display("FAIL no load writes"); end
    checks++; if (m.n_add == 0)           begin failures++; $display("FAIL no ADD"); end
    checks++; if (m.n_sub == 0)           begin failures++; $display("FAIL no SUB"); end
    checks++; if (m.n_and == 0)           begin failures++; $display("FAIL no AND"); end
    checks++; if (m.n_or == 0)            begin failures++; $display("FAIL no OR"); end
    checks++; if (m.n_lw == 0)            begin failures++; $display("FAIL no LW"); end
    checks++; if (m.n_sw == 0)            begin failures++; $display("FAIL no SW"); end
    checks++; if (m.n_beq_taken == 0)     begin failures++; $display("FAIL no taken BEQ"); end
    checks++; if (m.n_beq_not_taken == 0) begin failures++; $display("FAIL no untaken BEQ"); end
    checks++; if (m.n_jmp == 0)           begin failures++; $display("FAIL no JMP"); end
    checks++; if (m.n_const_write == 0)   begin failures++; $display("FAIL no constant-register write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
