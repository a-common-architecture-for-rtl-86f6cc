// datapath_ctrl: the datapath controller of one processing element.
//
// It sits between the control unit's broadcast flags and the PE's ALU,
// register file and memory bank, and does four things:
//  * operand and result selection: ALU operand B is the register-file value or
//    the immediate (UseData_Imm_Or_RegB); the value written to C is the ALU
//    result or the immediate (UseData_Imm_Or_ALU). The immediate is the low 16
//    bits of the word that follows an immediate instruction (Crnt_Instrn_2).
//  * the data bus: during a read-out (Send_Final_Output_On_Bus) or a
//    PE-to-PE transfer (Send_Data_Reg) an addressed PE requests the bus and,
//    once granted, drives {1, MY_ID, Addr_A, mem[Addr_A]} on its final_output.
//    For a transfer, every PE named by bits [3:0] of the B field (or all PEs
//    for 1111) writes the bus data into its own memory at Addr_C.
//  * the memory write port: results from the register file and words received
//    from the bus share it (the control unit never asks for both at once).
//  * process_done: low from the moment a new instruction is latched until this
//    PE has finished its part (result written, word sent, or at once when the
//    PE is not addressed). The control unit waits for every PE's process_done.
//
// What the document gives: the two immediate selects, do_process gating and
// the process_done handshake; the bus request/grant scheme, the transfer
// addressing and the exact completion points are this design's own.
//
// Timing: selects and bus word are combinational; process_done is a register
// that rises on the edge where the PE's last action takes place.
module datapath_ctrl
  import modsimd_pkg::*;
#(
  parameter pe_id_t MY_ID = 4'd1
) (
  input  logic      clk,
  input  logic      rst,
  input  ctrl_t     ctrl,
  input  instr_t    instr,
  input  data_t     imm,
  input  logic      do_process,
  // operand / result selection
  input  data_t     reg_port_b,
  input  data_t     alu_result,
  output data_t     oprnd_b,
  output data_t     regport_c,
  // memory write port
  input  logic      rf_we,
  input  addr_t     rf_waddr,
  input  data_t     rf_wdata,
  output logic      mem_we,
  output addr_t     mem_waddr,
  output data_t     mem_wdata,
  // data bus
  input  data_t     mem_word_a,
  output logic      bus_req,
  input  logic      bus_grant,
  output bus_word_t final_output,
  input  bus_word_t bus_in,
  output logic      process_done
);

  logic bus_op, rx_hit;

  assign oprnd_b   = ctrl.use_imm_or_regb ? imm : reg_port_b;
  assign regport_c = ctrl.use_imm_or_alu  ? imm : alu_result;

  assign bus_op  = ctrl.send_final_output || ctrl.send_data_reg;
  assign bus_req = bus_op && do_process && !process_done;

  always_comb begin
    final_output = '0;
    if (bus_req && bus_grant) begin
      final_output.valid = 1'b1;
      final_output.pe_id = MY_ID;
      final_output.addr  = instr.addr_a;
      final_output.data  = mem_word_a;
    end
  end

  // Receive side of a PE-to-PE transfer.
  assign rx_hit = ctrl.send_data_reg && bus_in.valid &&
                  (instr.addr_b[ID_W-1:0] == MY_ID || instr.addr_b[ID_W-1:0] == COMMON_ID);

  always_comb begin
    if (rx_hit) begin
      mem_we    = 1'b1;
      mem_waddr = instr.addr_c;
      mem_wdata = bus_in.data;
    end else begin
      mem_we    = rf_we;
      mem_waddr = rf_waddr;
      mem_wdata = rf_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      process_done <= 1'b1;
    end else if (ctrl.latch_instr) begin
      process_done <= 1'b0;
    end else if (!process_done) begin
      if (!do_process) begin
        process_done <= 1'b1;
      end else begin
        unique case (instr.cls)
          CLS_ALU: if (ctrl.write_regc) process_done <= 1'b1;
          CLS_IMM: if (ctrl.write_regc) process_done <= 1'b1;
          CLS_BUS: if (instr.mode == BUS_SEND || instr.mode == BUS_XFER) begin
                     if (bus_req && bus_grant) process_done <= 1'b1;
                   end else begin
                     process_done <= 1'b1;
                   end
          default: process_done <= 1'b1;
        endcase
      end
    end
  end

endmodule
