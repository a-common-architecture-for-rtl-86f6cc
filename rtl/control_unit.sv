// control_unit: the single controller of the modSIMD processor.
//
// It runs the documented control loop: wait for a new instruction, latch it,
// decode it and set the flags for the processing elements, then wait until
// every PE's process_done is high before taking the next instruction. Bits
// [31:30] (class) and [23:22] (mode) are decoded here; everything else in the
// instruction goes to the PEs unchanged.
//
// States (current_state, 3 bits):
//   IDLE  (0) rd_instr high; a valid word is latched (Latch_Instr). An
//             immediate instruction goes to IMM, any other to FETCH.
//   IMM   (1) rd_instr high; the next valid word is latched as the immediate.
//   FETCH (2) Rd_Oprnd_A / Rd_Oprnd_B: operands from memory to registers.
//   EXEC  (3) Latch_Result / Latch_Flags (UseData_Imm_Or_RegB for an immediate
//             operand), or Reset_AluRegs for a clear; bus instructions raise
//             their bus flag here and hold it until the end of WAIT.
//   WRITE (4) Write_RegC (UseData_Imm_Or_ALU for a load-immediate).
//   WAIT  (5) until all process_done are high; then EndOfInstrn pulses.
// A register or immediate-operand instruction therefore takes 5 cycles from the
// cycle its first word is taken to the cycle EndOfInstrn is high (6 with the
// immediate word), if the next word is offered at once. A bus instruction
// takes at least one cycle per PE that drives the bus.
//
// The loop and the flag names follow the document; the state encoding, the
// step each flag falls in and the class/mode codes are this design's own.
// OUT_VALID is high while a read-out instruction owns the bus.
module control_unit
  import modsimd_pkg::*;
#(
  parameter int NUM_PE = 10
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [INSTR_W-1:0] instr_in,
  input  logic               instr_valid,
  input  instr_t             crnt_instrn,
  input  logic [NUM_PE-1:0]  process_done,
  output logic               rd_instr,
  output logic               latch_instr_1,
  output logic               latch_instr_2,
  output ctrl_t              ctrl,
  output logic               end_of_instrn,
  output logic               out_valid,
  output logic [2:0]         current_state
);

  typedef enum logic [2:0] {
    S_IDLE  = 3'd0,
    S_IMM   = 3'd1,
    S_FETCH = 3'd2,
    S_EXEC  = 3'd3,
    S_WRITE = 3'd4,
    S_WAIT  = 3'd5
  } state_e;

  state_e state, state_nxt;
  instr_t in_word;
  logic   all_done, is_alu, is_imm_opb, is_imm_load, is_send, is_xfer, is_clr;

  assign in_word  = instr_t'(instr_in);
  assign all_done = &process_done;

  assign is_alu      = crnt_instrn.cls == CLS_ALU;
  assign is_imm_opb  = crnt_instrn.cls == CLS_IMM && !crnt_instrn.mode[0];
  assign is_imm_load = crnt_instrn.cls == CLS_IMM &&  crnt_instrn.mode[0];
  assign is_send     = crnt_instrn.cls == CLS_BUS && crnt_instrn.mode == BUS_SEND;
  assign is_xfer     = crnt_instrn.cls == CLS_BUS && crnt_instrn.mode == BUS_XFER;
  assign is_clr      = crnt_instrn.cls == CLS_CTL && crnt_instrn.mode == CTL_CLR;

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else     state <= state_nxt;
  end

  always_comb begin
    state_nxt     = state;
    ctrl          = '0;
    rd_instr      = 1'b0;
    latch_instr_1 = 1'b0;
    latch_instr_2 = 1'b0;
    end_of_instrn = 1'b0;
    unique case (state)
      S_IDLE: begin
        rd_instr = 1'b1;
        if (instr_valid) begin
          latch_instr_1    = 1'b1;
          ctrl.latch_instr = 1'b1;
          state_nxt = (in_word.cls == CLS_IMM) ? S_IMM : S_FETCH;
        end
      end
      S_IMM: begin
        rd_instr = 1'b1;
        if (instr_valid) begin
          latch_instr_2 = 1'b1;
          state_nxt     = S_FETCH;
        end
      end
      S_FETCH: begin
        ctrl.rd_oprnd_a = is_alu || is_imm_opb;
        ctrl.rd_oprnd_b = is_alu;
        state_nxt       = S_EXEC;
      end
      S_EXEC: begin
        ctrl.latch_result      = is_alu || is_imm_opb;
        ctrl.latch_flags       = is_alu || is_imm_opb;
        ctrl.use_imm_or_regb   = is_imm_opb;
        ctrl.reset_alu_regs    = is_clr;
        ctrl.send_final_output = is_send;
        ctrl.send_data_reg     = is_xfer;
        state_nxt              = S_WRITE;
      end
      S_WRITE: begin
        ctrl.write_regc        = is_alu || is_imm_opb || is_imm_load;
        ctrl.use_imm_or_alu    = is_imm_load;
        ctrl.send_final_output = is_send;
        ctrl.send_data_reg     = is_xfer;
        state_nxt              = S_WAIT;
      end
      S_WAIT: begin
        ctrl.send_final_output = is_send;
        ctrl.send_data_reg     = is_xfer;
        if (all_done) begin
          end_of_instrn = 1'b1;
          state_nxt     = S_IDLE;
        end
      end
      default: state_nxt = S_IDLE;
    endcase
  end

  assign out_valid     = ctrl.send_final_output;
  assign current_state = state;

  // A result write and a bus transfer share the PEs' memory write port.
  a_one_writer: assert property (@(posedge clk) disable iff (rst)
                                 !(ctrl.write_regc && ctrl.send_data_reg));

endmodule
