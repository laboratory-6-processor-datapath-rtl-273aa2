// hw_ref_pkg: instruction-level reference model of the 16-bit HW instruction
// set, used by the processor testbenches to predict, for each instruction,
// the values on the CPU's observable pins (Read Data 1/2, ALU result, Zero)
// and the architectural state after it (registers, data memory, PC). It is
// written from the instruction-set definition alone and shares no code with
// the RTL.
package hw_ref_pkg;

  typedef struct {
    logic [15:0] rd1;
    logic [15:0] rd2;
    logic [15:0] alu;
    logic        zero;
    logic        alu_known;  // false for JMP, whose ALU operation is unspecified
  } pins_t;

  class hw_model;
    logic [15:0] regs [16];
    logic [15:0] mem  [256];
    logic [7:0]  pc;

    // Event counters for coverage of the instruction mechanisms.
    int n_add, n_sub, n_and, n_or, n_lw, n_sw;
    int n_beq_taken, n_beq_not_taken, n_jmp, n_const_write;

    function new();
      reset();
    endfunction

    function void reset();
      foreach (regs[i]) regs[i] = 16'h0000;
      pc = 8'h00;
    endfunction

    function logic [15:0] rd(input logic [3:0] r);
      if (r == 0) return 16'd0;
      if (r == 1) return 16'd1;
      return regs[r];
    endfunction

    function void wr(input logic [3:0] r, input logic [15:0] v);
      if (r < 2) n_const_write++;
      else regs[r] = v;
    endfunction

    // Predict the pins for `instr` at the current state, then apply it.
    function pins_t step(input logic [15:0] instr);
      pins_t p;
      logic [3:0] op, s, t, d;
      logic [15:0] off16;
      logic [7:0]  off8;
      op = instr[15:12]; s = instr[11:8]; t = instr[7:4]; d = instr[3:0];
      off16 = 16'($signed(instr[3:0]));
      off8  = 8'($signed(instr[3:0]));
      p.rd1 = rd(s);
      p.rd2 = rd(t);
      p.alu_known = 1'b1;
      case (op)
        4'h0: p.alu = p.rd1 + off16;
        4'h1: p.alu = p.rd1 + off16;
        4'h2: p.alu = p.rd1 + p.rd2;
        4'h3: p.alu = p.rd1 - p.rd2;
        4'h4: p.alu = p.rd1 & p.rd2;
        4'h5: p.alu = p.rd1 | p.rd2;
        4'h7: p.alu = p.rd1 - p.rd2;
        default: begin p.alu = 16'h0; p.alu_known = 1'b0; end
      endcase
      p.zero = (p.alu == 16'h0);
      case (op)
        4'h0: begin wr(t, mem[p.alu[7:0]]); n_lw++; pc = pc + 8'd2; end
        4'h1: begin mem[p.alu[7:0]] = p.rd2; n_sw++; pc = pc + 8'd2; end
        4'h2: begin wr(d, p.alu); n_add++; pc = pc + 8'd2; end
        4'h3: begin wr(d, p.alu); n_sub++; pc = pc + 8'd2; end
        4'h4: begin wr(d, p.alu); n_and++; pc = pc + 8'd2; end
        4'h5: begin wr(d, p.alu); n_or++;  pc = pc + 8'd2; end
        4'h7: begin
          if (p.rd1 == p.rd2) begin
            pc = pc + 8'd2 + (off8 << 1);
            n_beq_taken++;
          end else begin
            pc = pc + 8'd2;
            n_beq_not_taken++;
          end
        end
        4'h8: begin pc = 8'(instr[11:0] * 2); n_jmp++; end
        default: pc = pc + 8'd2;
      endcase
      return p;
    endfunction
  endclass

endpackage
