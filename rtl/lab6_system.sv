// lab6_system: the complete lab setup of the board schematic - the cpu, the
// external instruction memory and the switch-driven path that writes a program
// into it.
//
// Loading: with load = 0 the instruction memory is addressed by sw_addr, and
// holding wr_n = 0 writes sw_data there (sampled on the rising clock edge).
// Running: with load = 1 the memory is addressed by the CPU's PC and its output
// feeds the CPU's instruction input; after reset is released the CPU executes
// one instruction per rising edge of clk. The schematic's CLK is a hand-toggled
// switch; here one clock drives both the memory write and the CPU, so reset
// should be held while a program is loaded to keep the CPU from running from
// a half-written memory. The instruction memory's output enable is tied
// active, as in the schematic. All outputs are the values the schematic shows
// on its displays: PC, instruction, Read Data 1/2, ALU result and Zero.
module lab6_system
  import hw_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  load,
  input  logic  wr_n,
  input  addr_t sw_addr,
  input  word_t sw_data,
  output addr_t pc,
  output word_t instr,
  output word_t rf_rdata1,
  output word_t rf_rdata2,
  output word_t alu_result,
  output logic  zero
);
  addr_t imem_addr;

  imem_addr_select u_addr_sel (
    .load    (load),
    .sw_addr (sw_addr),
    .cpu_addr(pc),
    .mem_addr(imem_addr)
  );

  instr_mem u_imem (
    .clk (clk),
    .addr(imem_addr),
    .oe_n(1'b0),
    .we_n(wr_n | load),
    .din (sw_data),
    .dout(instr)
  );

  cpu u_cpu (
    .clk       (clk),
    .reset     (reset),
    .instr     (instr),
    .pc        (pc),
    .rf_rdata1 (rf_rdata1),
    .rf_rdata2 (rf_rdata2),
    .alu_result(alu_result),
    .zero      (zero)
  );
endmodule
