// tb_sign_extend: exhaustive test of the 4-to-16 and 4-to-8 sign extenders
// against the integer value of the 4-bit field read as two's complement.
module tb_sign_extend;
  int checks = 0, failures = 0;
  logic [3:0]  in;
  logic [15:0] out16;
  logic [7:0]  out8;

  sign_extend #(.IN_W(4), .OUT_W(16)) dut16 (.in(in), .out(out16));
  sign_extend #(.IN_W(4), .OUT_W(8))  dut8  (.in(in), .out(out8));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -8; v < 8; v++) begin
      in = 4'(v);
      #1;
      checks += 2;
      if (out16 != 16'(v)) begin failures++; $display("FAIL 16: in=%0d out=%h", v, out16); end
      if (out8  != 8'(v))  begin failures++; $display("FAIL 8: in=%0d out=%h", v, out8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
