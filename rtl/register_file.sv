// register_file: 16 registers of 16 bits with two combinational read ports
// (Read Addr 1/2 -> Read Data 1/2) and one write port (Write Addr, Write Data,
// Write Enable) written on the rising clock edge. R0 always reads 0 and R1
// always reads 1, as the ISA fixes them; writes to them are discarded.
// R2-R15 are general purpose. Clearing R2-R15 on the asynchronous, active-high
// reset is this design's choice (the ISA only defines the PC's reset), made so
// that every register has a known value after reset.
module register_file
  import hw_pkg::*;
#(
  parameter int unsigned W = DATA_W,
  parameter int unsigned N = NREGS
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic [$clog2(N)-1:0] raddr1,
  input  logic [$clog2(N)-1:0] raddr2,
  output logic [W-1:0]         rdata1,
  output logic [W-1:0]         rdata2,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [W-1:0]         wdata
);
  logic [W-1:0] regs [2:N-1];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 2; i < N; i++) regs[i] <= '0;
    end else if (we && waddr > 1) begin
      regs[waddr] <= wdata;
    end
  end

  function automatic logic [W-1:0] read_reg(input logic [$clog2(N)-1:0] a);
    if (a == 0)      return W'(0);
    else if (a == 1) return W'(1);
    else             return regs[a];
  endfunction

  always_comb begin
    rdata1 = read_reg(raddr1);
    rdata2 = read_reg(raddr2);
  end
endmodule
