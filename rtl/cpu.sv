// cpu: single-cycle processor for the 16-bit HW instruction set (LW, SW, ADD,
// SUB, AND, OR, BEQ, JMP). Every instruction completes in one clock cycle: the
// PC addresses the external instruction memory, the instruction comes back on
// `instr`, is decoded, executed and written back, and the PC is updated on the
// next rising clock edge.
//
// Datapath, as drawn in the datapath diagram:
//   Rs = instr[11:8] -> Read Addr 1, Rt = instr[7:4] -> Read Addr 2
//   Write Addr  = MemLoad ? Rt : Rd           (Rd = instr[3:0])
//   ALU A       = Read Data 1 (Rs)
//   ALU B       = MemLoad ? sext16(offset) : Read Data 2
//   Data memory : address = ALU result[7:0], write data = Read Data 2,
//                 write enable = MemStore
//   Write Data  = MemLoad ? memory read data : ALU result
// BEQ subtracts Rt from Rs and branches when the ALU's Zero flag is set.
// The data memory lives inside this module, as the board schematic shows no
// data memory outside the CPU. Outputs mirror the CPU pins of the schematic:
// A7..A0 (pc), RF1/RF2 (read data), ALU result and Zero.
module cpu
  import hw_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  word_t instr,
  output addr_t pc,
  output word_t rf_rdata1,
  output word_t rf_rdata2,
  output word_t alu_result,
  output logic  zero
);
  opcode_e opcode;
  ridx_t   rs, rt, rd;
  ctrl_t   ctrl;
  word_t   offset_ext;
  word_t   alu_b;
  word_t   mem_rdata;
  word_t   wb_data;
  ridx_t   waddr;


  assign opcode = opcode_e'(instr[15:12]);
  assign rs     = instr[11:8];
  assign rt     = instr[7:4];
  assign rd     = instr[3:0];

  pc_unit u_pc (
    .clk       (clk),
    .reset     (reset),
    .branch    (ctrl.branch),
    .zero      (zero),
    .jump      (ctrl.jump),
    .br_offset (instr[3:0]),
    .jmp_offset(instr[11:0]),
    .pc        (pc)
  );

  control_unit u_ctrl (
    .opcode(opcode),
    .ctrl  (ctrl)
  );

  register_file u_rf (
    .clk   (clk),
    .reset (reset),
    .raddr1(rs),
    .raddr2(rt),
    .rdata1(rf_rdata1),
    .rdata2(rf_rdata2),
    .we    (ctrl.reg_write),
    .waddr (waddr),
    .wdata (wb_data)
  );

  sign_extend #(.IN_W(4), .OUT_W(DATA_W)) u_sext (
    .in (rd),
    .out(offset_ext)
  );

  alu u_alu (
    .alu_op(ctrl.alu_op),
    .a     (rf_rdata1),
    .b     (alu_b),
    .result(alu_result),
    .zero  (zero)
  );

  data_memory u_dmem (
    .clk  (clk),
    .addr (alu_result[ADDR_W-1:0]),
    .we   (ctrl.mem_store),
    .wdata(rf_rdata2),
    .rdata(mem_rdata)
  );

  always_comb begin
    waddr   = ctrl.mem_load ? rt : rd;
    alu_b   = ctrl.mem_load ? offset_ext : rf_rdata2;
    wb_data = ctrl.mem_load ? mem_rdata : alu_result;
  end
endmodule
