// control_unit: decodes the 4-bit opcode into the processor's control lines
// (ALUop, RegWrite, MemLoad, MemStore, Branch, Jump), one row per instruction
// exactly as in the ISA control table. JMP's ALUop is a don't-care there; this
// design drives ALU_ADD. Opcodes the ISA does not define (0110, 1001-1111)
// decode to a no-op: no register or memory write, PC advances by 2.
// Combinational.
module control_unit
  import hw_pkg::*;
(
  input  logic [3:0] opcode,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{alu_op: ALU_ADD, reg_write: 1'b0, mem_load: 1'b0,
             mem_store: 1'b0, branch: 1'b0, jump: 1'b0};
    case (opcode)
      OP_LW:  begin ctrl.alu_op = ALU_ADD; ctrl.reg_write = 1'b1; ctrl.mem_load = 1'b1; end
      OP_SW:  begin ctrl.alu_op = ALU_ADD; ctrl.mem_load = 1'b1; ctrl.mem_store = 1'b1; end
      OP_ADD: begin ctrl.alu_op = ALU_ADD; ctrl.reg_write = 1'b1; end
      OP_SUB: begin ctrl.alu_op = ALU_SUB; ctrl.reg_write = 1'b1; end
      OP_AND: begin ctrl.alu_op = ALU_AND; ctrl.reg_write = 1'b1; end
      OP_OR:  begin ctrl.alu_op = ALU_OR;  ctrl.reg_write = 1'b1; end
      OP_BEQ: begin ctrl.alu_op = ALU_SUB; ctrl.branch = 1'b1; end
      OP_JMP: begin ctrl.jump = 1'b1; end
      default: ;
    endcase
  end
endmodule
