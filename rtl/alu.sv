// alu: 16-bit arithmetic/logic unit of the processor. The 4-bit ALUop selects
// AND (0000), OR (0001), add (0010) or subtract (0110), the encoding given by
// the instruction-set tables. Zero is 1 when the result is 0; BEQ uses it with
// a subtraction to test Rs == Rt. ALUop codes outside those four are left
// undefined by the ISA; this design returns 0 for them. Combinational.
module alu
  import hw_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [3:0]   alu_op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] result,
  output logic         zero
);
  always_comb begin
    unique case (alu_op)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      default: result = '0;
    endcase
  end

  assign zero = (result == '0);
endmodule
