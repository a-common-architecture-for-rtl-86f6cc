// tb_reg_file: operand registers load from a modelled memory on Rd_Oprnd_A/B
// only while do_process is high; Write_RegC produces a write of RegPort_C to
// Addr_C only while do_process is high.
module tb_reg_file;
  import modsimd_pkg::*;
  logic clk = 0, rst = 1, do_process = 0, rd_oprnd_a = 0, rd_oprnd_b = 0, write_regc = 0;
  addr_t addr_a = 0, addr_b = 0, addr_c = 0, mem_rd_addr_a, mem_rd_addr_b, mem_waddr;
  data_t regport_c = 0, mem_rd_data_a, mem_rd_data_b, reg_port_a, reg_port_b, mem_wdata;
  logic mem_we;
  data_t mem [64];
  data_t ea = 0, eb = 0;
  int checks = 0, failures = 0;

  reg_file dut (.*);
  assign mem_rd_data_a = mem[mem_rd_addr_a];
  assign mem_rd_data_b = mem[mem_rd_addr_b];

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) mem[i] = 16'($urandom);
    @(posedge clk); #1 rst = 0;
    checks++; if (reg_port_a !== 0 || reg_port_b !== 0) begin failures++; $display("FAIL reset"); end
    for (int it = 0; it < 2000; it++) begin
      do_process = 1'($urandom); rd_oprnd_a = 1'($urandom); rd_oprnd_b = 1'($urandom);
      write_regc = 1'($urandom);
      addr_a = 6'($urandom); addr_b = 6'($urandom); addr_c = 6'($urandom); regport_c = 16'($urandom);
      #1;
      checks++;
      if (mem_we !== (write_regc && do_process) || (mem_we && (mem_waddr !== addr_c || mem_wdata !== regport_c))) begin
        failures++; $display("FAIL write request");
      end
      if (do_process && rd_oprnd_a) ea = mem[addr_a];
      if (do_process && rd_oprnd_b) eb = mem[addr_b];
      @(posedge clk); #1;
      checks += 2;
      if (reg_port_a !== ea) begin failures++; $display("FAIL A %h %h", reg_port_a, ea); end
      if (reg_port_b !== eb) begin failures++; $display("FAIL B"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
