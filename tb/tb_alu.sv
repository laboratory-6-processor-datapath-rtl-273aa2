// tb_alu: checks the four ALU operations (AND 0000, OR 0001, add 0010,
// subtract 0110) and the Zero flag on corner values and random operands,
// including equal operands under subtraction as BEQ uses it.
module tb_alu;
  int checks = 0, failures = 0;
  logic [3:0]  op;
  logic [15:0] a, b, res;
  logic        zero;

  alu dut (.alu_op(op), .a(a), .b(b), .result(res), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [3:0] o, input logic [15:0] x, input logic [15:0] y);
    logic [15:0] exp;
    op = o; a = x; b = y;
    #1;
    case (o)
      4'b0000: exp = x & y;
      4'b0001: exp = x | y;
      4'b0010: exp = 16'((32'(x) + 32'(y)) % 65536);
      4'b0110: exp = 16'((32'(x) + 65536 - 32'(y)) % 65536);
      default: exp = 16'h0;
    endcase
    checks += 2;
    if (res !== exp) begin failures++; $display("FAIL op=%b a=%h b=%h res=%h exp=%h", o, x, y, res, exp); end
    if (zero !== (exp == 16'h0)) begin failures++; $display("FAIL zero op=%b a=%h b=%h", o, x, y); end
  endtask

  initial begin
    static logic [3:0] ops [4] = '{4'b0000, 4'b0001, 4'b0010, 4'b0110};
    foreach (ops[i]) begin
      try(ops[i], 16'h0000, 16'h0000);
      try(ops[i], 16'hFFFF, 16'h0001);
      try(ops[i], 16'h1234, 16'h1234);
      try(ops[i], 16'h8000, 16'h7FFF);
      try(ops[i], 16'h00F0, 16'h0F0F);
      for (int k = 0; k < 200; k++) try(ops[i], 16'($urandom), 16'($urandom));
    end
    for (int k = 0; k < 50; k++) begin
      static logic [15:0] v;
      v = 16'($urandom);
      try(4'b0110, v, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
