// tb_pc_unit: checks reset to 0, PC + 2 sequencing, BEQ taken only when both
// Branch and Zero are 1 (target PC + 2 + 2 * sign-extended offset, for all
// 16 offsets), and JMP to offset * 2. Expected PCs are computed with integer
// arithmetic modulo 256. Every update takes exactly one clock edge.
module tb_pc_unit;
  int checks = 0, failures = 0;
  logic        clk = 0, reset, branch, zero, jump;
  logic [3:0]  br_off;
  logic [11:0] jmp_off;
  logic [7:0]  pc;
  int          exp_pc;

  pc_unit dut (.clk(clk), .reset(reset), .branch(branch), .zero(zero), .jump(jump),
               .br_offset(br_off), .jmp_offset(jmp_off), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic b, input logic z, input logic j,
                       input logic [3:0] bo, input logic [11:0] jo);
    int soff;
    branch = b; zero = z; jump = j; br_off = bo; jmp_off = jo;
    soff = (bo >= 8) ? int'(bo) - 16 : int'(bo);
    if (j)           exp_pc = (int'(jo) * 2) % 256;
    else if (b && z) exp_pc = (exp_pc + 2 + 2 * soff + 512) % 256;
    else             exp_pc = (exp_pc + 2) % 256;
    @(posedge clk); #1;
    checks++;
    if (int'(pc) != exp_pc) begin
      failures++; $display("FAIL b=%b z=%b j=%b bo=%h jo=%h pc=%h exp=%h", b, z, j, bo, jo, pc, exp_pc);
    end
    @(negedge clk);
  endtask

  initial begin
    branch = 0; zero = 0; jump = 0; br_off = 0; jmp_off = 0;
    reset = 1; #12;
    checks++;
    if (pc !== 8'h00) begin failures++; $display("FAIL reset pc=%h", pc); end
    @(negedge clk); reset = 0;
    exp_pc = 0;
    for (int k = 0; k < 140; k++) cycle(0, 1'($urandom % 2), 0, 4'($urandom), 12'($urandom));
    for (int o = 0; o < 16; o++) begin
      cycle(1, 1, 0, 4'(o), 12'h0);
      cycle(1, 0, 0, 4'(o), 12'h0);
      cycle(0, 1, 0, 4'(o), 12'h0);
    end
    for (int k = 0; k < 50; k++) cycle(1'($urandom % 2), 1'($urandom % 2), 1, 4'($urandom), 12'($urandom));
    for (int k = 0; k < 300; k++)
      cycle(1'($urandom % 2), 1'($urandom % 2), 1'(($urandom % 8) == 0), 4'($urandom), 12'($urandom));
    // asynchronous reset mid-run
    #3 reset = 1; #1;
    checks++;
    if (pc !== 8'h00) begin failures++; $display("FAIL async reset pc=%h", pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
