// data_memory: 2**AW words (AW = 8) of 16 bits. The word at `addr` is read
// combinationally; when `we` (MemStore) is 1 the word `wdata` is written on the
// rising clock edge. The processor drives `addr` with the low 8 bits of the
// ALU result (the address bus is 8 bits wide) and uses each address as one
// 16-bit location, so the example program's data addresses 0, 2 and 4 are three
// separate words. The memory is not cleared by reset (an SRAM); programs
// store before they load.
module data_memory
  import hw_pkg::*;
#(
  parameter int unsigned W      = DATA_W,
  parameter int unsigned AW = ADDR_W
) (
  input  logic              clk,
  input  logic [AW-1:0] addr,
  input  logic              we,
  input  logic [W-1:0]      wdata,
  output logic [W-1:0]      rdata
);
  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
