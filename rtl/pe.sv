// pe: one processing element of the modSIMD processor.
//
// A PE holds a hard-wired identifier (MY_ID), a PE_ID decoder producing
// do_process, a datapath controller, a 16-bit ALU, an operand register file and
// a 64-word local memory bank, connected as in the documented PE schematic.
// The PE cannot fetch or interpret instructions: it takes the current
// instruction (Crnt_Instrn_1), the immediate word (Crnt_Instrn_2) and the
// control unit's flags, and acts on them only when do_process is high.
//
// Sequence of a register instruction, one control-unit step per clock:
// Rd_Oprnd_A/B load the operand registers from memory, Latch_Result/Latch_Flags
// store the ALU result and flags, Write_RegC writes the result to memory at
// Addr_C; process_done then goes high. Bus instructions request the data bus
// through bus_req/bus_grant and put the PE's word on final_output.
//
// During global reset the memory bank stores the sensor words from the PE's own
// vertical port and from its neighbours' ports (see mem_bank).
module pe
  import modsimd_pkg::*;
#(
  parameter pe_id_t MY_ID      = 4'd1,
  parameter pe_id_t UP_ID      = 4'd0,
  parameter pe_id_t DN_ID      = 4'd2,
  parameter int     NBR_UP_OFS = -10,
  parameter int     NBR_DN_OFS = 22
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      read_input_frm_adc,
  input  bus_word_t adc_own,
  input  bus_word_t adc_up,
  input  bus_word_t adc_dn,
  input  ctrl_t     ctrl,
  input  instr_t    crnt_instrn_1,
  input  logic [INSTR_W-1:0] crnt_instrn_2,
  output logic      bus_req,
  input  logic      bus_grant,
  output bus_word_t final_output,
  input  bus_word_t bus_in,
  output logic      process_done,
  output logic      do_process,
  output logic      carry_flag,
  output logic      neg_flag,
  output logic      zro_flag
);

  data_t reg_port_a, reg_port_b, oprnd_b, alu_result, regport_c;
  data_t mem_rd_data_a, mem_rd_data_b, rf_wdata, mem_wdata;
  addr_t mem_rd_addr_a, mem_rd_addr_b, rf_waddr, mem_waddr;
  logic  rf_we, mem_we;

  pe_id_decode #(.MY_ID(MY_ID)) u_id (
    .instr_pe_id (crnt_instrn_1.pe_id),
    .do_process  (do_process)
  );

  datapath_ctrl #(.MY_ID(MY_ID)) u_dp (
    .clk, .rst, .ctrl,
    .instr        (crnt_instrn_1),
    .imm          (crnt_instrn_2[DATA_W-1:0]),
    .do_process,
    .reg_port_b,
    .alu_result,
    .oprnd_b,
    .regport_c,
    .rf_we, .rf_waddr, .rf_wdata,
    .mem_we, .mem_waddr, .mem_wdata,
    .mem_word_a   (mem_rd_data_a),
    .bus_req, .bus_grant, .final_output, .bus_in,
    .process_done
  );

  alu #(.WIDTH(DATA_W)) u_alu (
    .clk, .rst,
    .reset_alu_regs (ctrl.reset_alu_regs),
    .do_process,
    .latch_result   (ctrl.latch_result),
    .latch_flags    (ctrl.latch_flags),
    .alu_op         (crnt_instrn_1.alu_op),
    .oprnd_a        (reg_port_a),
    .oprnd_b        (oprnd_b),
    .result         (alu_result),
    .carry_flag, .neg_flag, .zro_flag
  );

  reg_file u_rf (
    .clk, .rst, .do_process,
    .rd_oprnd_a    (ctrl.rd_oprnd_a),
    .rd_oprnd_b    (ctrl.rd_oprnd_b),
    .write_regc    (ctrl.write_regc),
    .addr_a        (crnt_instrn_1.addr_a),
    .addr_b        (crnt_instrn_1.addr_b),
    .addr_c        (crnt_instrn_1.addr_c),
    .regport_c,
    .mem_rd_data_a, .mem_rd_data_b,
    .mem_rd_addr_a, .mem_rd_addr_b,
    .reg_port_a, .reg_port_b,
    .mem_we        (rf_we),
    .mem_waddr     (rf_waddr),
    .mem_wdata     (rf_wdata)
  );

  mem_bank #(
    .DEPTH     (MEM_DEPTH), .MY_ID(MY_ID), .UP_ID(UP_ID), .DN_ID(DN_ID),
    .NBR_UP_OFS(NBR_UP_OFS), .NBR_DN_OFS(NBR_DN_OFS)
  ) u_mem (
    .clk,
    .acq_en    (read_input_frm_adc),
    .adc_own, .adc_up, .adc_dn,
    .rd_addr_a (mem_rd_addr_a),
    .rd_addr_b (mem_rd_addr_b),
    .rd_data_a (mem_rd_data_a),
    .rd_data_b (mem_rd_data_b),
    .we        (mem_we),
    .waddr     (mem_waddr),
    .wdata     (mem_wdata)
  );

endmodule
