// hw_pkg: shared widths, opcode and ALU-operation encodings, and the
// control-word struct of the 16-bit "HW" single-cycle processor.
// Instruction format (MSB..LSB): opcode[15:12] Rs[11:8] Rt[7:4] Rd/offset[3:0];
// JMP uses bits [11:0] as one offset. Opcode and ALUop values are the ones the
// instruction-set tables define; the enum names and the struct are this
// design's own packaging of them.
package hw_pkg;

  localparam int unsigned DATA_W = 16;  // data bus width
  localparam int unsigned ADDR_W = 8;   // address bus width
  localparam int unsigned NREGS  = 16;  // register file size
  localparam int unsigned RIDX_W = 4;   // register index width

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [RIDX_W-1:0] ridx_t;

  typedef enum logic [3:0] {
    OP_LW  = 4'b0000,
    OP_SW  = 4'b0001,
    OP_ADD = 4'b0010,
    OP_SUB = 4'b0011,
    OP_AND = 4'b0100,
    OP_OR  = 4'b0101,
    OP_BEQ = 4'b0111,
    OP_JMP = 4'b1000
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_AND = 4'b0000,
    ALU_OR  = 4'b0001,
    ALU_ADD = 4'b0010,
    ALU_SUB = 4'b0110
  } aluop_e;

  // Control lines produced by the control unit for one instruction.
  typedef struct packed {
    aluop_e alu_op;
    logic   reg_write;
    logic   mem_load;   // selects Rt as write address, offset as ALU B, memory as write-back
    logic   mem_store;  // data memory write enable
    logic   branch;
    logic   jump;
  } ctrl_t;

endpackage
