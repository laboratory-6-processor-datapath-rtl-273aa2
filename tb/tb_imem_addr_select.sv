// tb_imem_addr_select: with LOAD = 0 the memory must see the switch address,
// with LOAD = 1 the CPU's PC; random addresses in both modes.
module tb_imem_addr_select;
  int checks = 0, failures = 0;
  logic       load;
  logic [7:0] sw_addr, cpu_addr, mem_addr;

  imem_addr_select dut (.load(load), .sw_addr(sw_addr), .cpu_addr(cpu_addr), .mem_addr(mem_addr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      load = 1'($urandom % 2); sw_addr = 8'($urandom); cpu_addr = 8'($urandom);
      #1;
      checks++;
      if (mem_addr !== (load ? cpu_addr : sw_addr)) begin
        failures++; $display("FAIL load=%b sw=%h cpu=%h got %h", load, sw_addr, cpu_addr, mem_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
