// imem_addr_select: drives the instruction memory's address bus. In the board
// schematic the Address switches reach the memory through an 8-bit buffer
// enabled while LOAD = 0, and the CPU's PC outputs are disconnected by hand
// while a program is entered. This module folds the buffer and the manual
// disconnect into one multiplexer: LOAD = 0 selects the switch address,
// LOAD = 1 the CPU's PC. Combinational.
module imem_addr_select
  import hw_pkg::*;
(
  input  logic  load,
  input  addr_t sw_addr,
  input  addr_t cpu_addr,
  output addr_t mem_addr
);
  always_comb mem_addr = load ? cpu_addr : sw_addr;
endmodule
