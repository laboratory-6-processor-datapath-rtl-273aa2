// pc_unit: program counter and next-address logic of the fetch stage.
// The 8-bit PC register is cleared to 0 by the asynchronous, active-high reset
// (programs start at address 0) and loads the next address on each rising
// clock edge. Following the branch-address diagram:
//   pc_plus2  = PC + 2
//   br_target = PC + 2 + (sign_extend_4to8(offset) << 1)
//   next      = (Branch & Zero) ? br_target : pc_plus2
// JMP sets PC <- offset * 2 with a 12-bit offset; only its low 8 bits fit the
// 8-bit PC, so the jump target is {jmp_offset[6:0], 1'b0}. The jump mux that
// gives JMP priority over the branch mux is this design's addition: the
// diagrams stop at the branch mux although the ISA and control table define
// the Jump line. Addition wraps modulo 256.
module pc_unit
  import hw_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        branch,
  input  logic        zero,
  input  logic        jump,
  input  logic [3:0]  br_offset,
  input  logic [11:0] jmp_offset,
  output addr_t       pc
);
  addr_t pc_plus2;
  addr_t pc_next;
  addr_t br_off_ext;
  addr_t br_target;
  addr_t jmp_target;

  sign_extend #(.IN_W(4), .OUT_W(ADDR_W)) u_br_sext (
    .in (br_offset),
    .out(br_off_ext)
  );

  always_comb begin
    pc_plus2   = pc + addr_t'(2);
    br_target  = pc_plus2 + {br_off_ext[ADDR_W-2:0], 1'b0};
    jmp_target = {jmp_offset[ADDR_W-2:0], 1'b0};
    if (jump)                 pc_next = jmp_target;
    else if (branch && zero)  pc_next = br_target;
    else                      pc_next = pc_plus2;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) pc <= '0;
    else       pc <= pc_next;
  end
endmodule
