// alu: the arithmetic and logic unit inside every processing element.
//
// It works on two 16-bit operands and the 6-bit ALU_OP field of the instruction
// (bits [29:24]). Its result and its carry, negative and zero flags are held in
// registers. What sets it apart from an ordinary ALU is the do_process input:
// a new result is latched on Latch_Result, and new flags on Latch_Flags, only
// when do_process is high; otherwise the ALU keeps its previous result, so a PE
// that is not addressed by an instruction does not react to it.
//
// Operations follow the documented list (add, subtract, copy A or B, shifts by
// one bit, all zeros, all ones and the two-input logic functions). The op-code
// numbers are this design's own (list order, with OP_ADD = 0 as documented).
// The shifts are logical: LEFT_SHIFT is A << 1, RIGHT_SHIFT is A >> 1.
// Codes 22..63 leave the result unchanged. Carry is the adder carry-out on add, the
// "no borrow" carry (A >= B) on subtract and the bit shifted out on a shift; it
// is 0 for the logic functions.
//
// Timing: combinational from operands to next_result; result and flags change
// on the clock edge where the latch strobe and do_process are both high.
// Reset (rst, or Reset_AluRegs while do_process) clears result and flags.
module alu
  import modsimd_pkg::*;
#(
  parameter int WIDTH = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              reset_alu_regs,
  input  logic              do_process,
  input  logic              latch_result,
  input  logic              latch_flags,
  input  logic [5:0]        alu_op,
  input  logic [WIDTH-1:0] oprnd_a,
  input  logic [WIDTH-1:0] oprnd_b,
  output logic [WIDTH-1:0] result,
  output logic              carry_flag,
  output logic              neg_flag,
  output logic              zro_flag
);

  logic [WIDTH-1:0] next_result;
  logic              next_carry;

  always_comb begin
    next_result = result;
    next_carry  = 1'b0;
    unique case (alu_op)
      OP_ADD:            {next_carry, next_result} = {1'b0, oprnd_a} + {1'b0, oprnd_b};
      OP_A, OP_AP, OP_APP: next_result = oprnd_a;
      OP_SUB:            {next_carry, next_result} = {1'b0, oprnd_a} + {1'b0, ~oprnd_b} + 1'b1;
      OP_LEFT_SHIFT:     {next_carry, next_result} = {oprnd_a, 1'b0};
      OP_RIGHT_SHIFT:    begin
                           next_result = oprnd_a >> 1;
                           next_carry  = oprnd_a[0];
                         end
      OP_ALL_ZEROS:      next_result = '0;
      OP_A_AND_B:        next_result = oprnd_a & oprnd_b;
      OP_NOTA_AND_B:     next_result = ~oprnd_a & oprnd_b;
      OP_B:              next_result = oprnd_b;
      OP_NOTA_AND_NOTB:  next_result = ~oprnd_a & ~oprnd_b;
      OP_A_XNOR_B:       next_result = ~(oprnd_a ^ oprnd_b);
      OP_NOTA:           next_result = ~oprnd_a;
      OP_NOTA_OR_B:      next_result = ~oprnd_a | oprnd_b;
      OP_A_AND_NOTB:     next_result = oprnd_a & ~oprnd_b;
      OP_A_XOR_B:        next_result = oprnd_a ^ oprnd_b;
      OP_A_OR_B:         next_result = oprnd_a | oprnd_b;
      OP_NOTB:           next_result = ~oprnd_b;
      OP_A_OR_NOTB:      next_result = oprnd_a | ~oprnd_b;
      OP_A_NAND_B:       next_result = ~(oprnd_a & oprnd_b);
      OP_ALL_ONES:       next_result = '1;
      default:           next_result = result;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || (reset_alu_regs && do_process)) begin
      result     <= '0;
      carry_flag <= 1'b0;
      neg_flag   <= 1'b0;
      zro_flag   <= 1'b0;
    end else if (do_process) begin
      if (latch_result) result <= next_result;
      if (latch_flags) begin
        carry_flag <= next_carry;
        neg_flag   <= next_result[WIDTH-1];
        zro_flag   <= (next_result == '0);
      end
    end
  end

endmodule
