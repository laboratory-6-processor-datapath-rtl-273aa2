// sign_extend: copies the sign bit of an IN_W-bit field into the upper bits of
// an OUT_W-bit result. The processor uses two copies: 4 to 16 bits for the
// load/store address offset fed to the ALU, and 4 to 8 bits for the branch
// offset added to the PC (both widths as drawn in the datapath diagrams).
// Purely combinational.
module sign_extend #(
  parameter int unsigned IN_W  = 4,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);
  always_comb out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};
endmodule
