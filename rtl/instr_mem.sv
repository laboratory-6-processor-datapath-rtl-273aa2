// instr_mem: the instruction memory, 2**AW words (AW = 8) of 16 bits with an 8-bit
// address A7..A0, data in DI15..DI0 and data out DO15..DO0, as in the board
// schematic. The word at `addr` appears combinationally on `dout` while the
// active-low output enable `oe_n` is 0 (the schematic ties it active); with
// oe_n = 1 the output reads 0, since this model has no high-impedance state.
// The active-low write strobe `we_n` (the WR switch) writes `din` at `addr`
// on a rising clock edge while it is 0. The schematic's memory is an
// asynchronous part written by the WR pulse; sampling the strobe on a clock is
// this design's synchronous stand-in. Every address holds one instruction, so
// with PC stepping by 2 the program occupies the even addresses.
module instr_mem
  import hw_pkg::*;
#(
  parameter int unsigned W      = DATA_W,
  parameter int unsigned AW = ADDR_W
) (
  input  logic              clk,
  input  logic [AW-1:0] addr,
  input  logic              oe_n,
  input  logic              we_n,
  input  logic [W-1:0]      din,
  output logic [W-1:0]      dout
);
  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (!we_n) mem[addr] <= din;
  end

  assign dout = oe_n ? '0 : mem[addr];
endmodule
