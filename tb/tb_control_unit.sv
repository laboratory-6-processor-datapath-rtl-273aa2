// tb_control_unit: compares the decoded control lines for every opcode with
// the instruction control table (ALUop, RegWrite, MemLoad, MemStore, Branch,
// Jump). Undefined opcodes must write nothing and must not branch or jump.
module tb_control_unit;
  import hw_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] opcode;
  ctrl_t      ctrl;

  control_unit dut (.opcode(opcode), .ctrl(ctrl));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {opcode, ALUop, RegWrite, MemLoad, MemStore, Branch, Jump}
  logic [12:0] table_rows [8] = '{
    {4'b0000, 4'b0010, 5'b11000},  // LW
    {4'b0001, 4'b0010, 5'b01100},  // SW
    {4'b0010, 4'b0010, 5'b10000},  // ADD
    {4'b0011, 4'b0110, 5'b10000},  // SUB
    {4'b0100, 4'b0000, 5'b10000},  // AND
    {4'b0101, 4'b0001, 5'b10000},  // OR
    {4'b0111, 4'b0110, 5'b00010},  // BEQ
    {4'b1000, 4'b0000, 5'b00001}   // JMP (ALUop not checked)
  };

  initial begin
    bit defined [16];
    foreach (defined[i]) defined[i] = 1'b0;
    foreach (table_rows[i]) begin
      logic [4:0] flags;
      opcode = table_rows[i][12:9];
      defined[opcode] = 1'b1;
      #1;
      flags = {ctrl.reg_write, ctrl.mem_load, ctrl.mem_store, ctrl.branch, ctrl.jump};
      checks++;
      if (flags !== table_rows[i][4:0]) begin
        failures++; $display("FAIL flags opcode=%b got=%b exp=%b", opcode, flags, table_rows[i][4:0]);
      end
      if (opcode != 4'b1000) begin
        checks++;
        if (4'(ctrl.alu_op) !== table_rows[i][8:5]) begin
          failures++; $display("FAIL aluop opcode=%b got=%b", opcode, ctrl.alu_op);
        end
      end
    end
    for (int o = 0; o < 16; o++) begin
      if (defined[o]) continue;
      opcode = 4'(o);
      #1;
      checks++;
      if (ctrl.reg_write || ctrl.mem_store || ctrl.branch || ctrl.jump) begin
        failures++; $display("FAIL undefined opcode=%b has side effects", opcode);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
