// reg_file: the operand registers of a processing element.
//
// On Rd_Oprnd_A the register file loads operand register A from the memory bank
// word at Addr_A, on Rd_Oprnd_B register B from the word at Addr_B; the two
// registers feed the ALU through Reg_PortA and Reg_PortB. On Write_RegC it
// passes RegPort_C (the ALU result or an immediate, chosen by the datapath
// controller) to the memory bank as a write to Addr_C. Like the ALU it acts
// only while do_process is high, so an unaddressed PE keeps its registers and
// writes nothing.
//
// The documented port list (Clk, Reset, Addr_A, Addr_B, Addr_C, Write_RegC,
// RegPort_C in; Reg_PortA, Reg_PortB out) is kept; the memory-side ports
// (read data in, write strobe/address/data out) are this design's own, since
// the memory bank is a separate block. The memory bank is read combinationally,
// so an operand is in its register one clock edge after Rd_Oprnd_A/B; the write
// request is combinational from Write_RegC and lands on the next edge.
module reg_file
  import modsimd_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  do_process,
  input  logic  rd_oprnd_a,
  input  logic  rd_oprnd_b,
  input  logic  write_regc,
  input  addr_t addr_a,
  input  addr_t addr_b,
  input  addr_t addr_c,
  input  data_t regport_c,
  input  data_t mem_rd_data_a,
  input  data_t mem_rd_data_b,
  output addr_t mem_rd_addr_a,
  output addr_t mem_rd_addr_b,
  output data_t reg_port_a,
  output data_t reg_port_b,
  output logic  mem_we,
  output addr_t mem_waddr,
  output data_t mem_wdata
);

  assign mem_rd_addr_a = addr_a;
  assign mem_rd_addr_b = addr_b;

  always_ff @(posedge clk) begin
    if (rst) begin
      reg_port_a <= '0;
      reg_port_b <= '0;
    end else if (do_process) begin
      if (rd_oprnd_a) reg_port_a <= mem_rd_data_a;
      if (rd_oprnd_b) reg_port_b <= mem_rd_data_b;
    end
  end

  assign mem_we    = write_regc && do_process;
  assign mem_waddr = addr_c;
  assign mem_wdata = regport_c;

endmodule
