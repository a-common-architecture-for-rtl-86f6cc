// instr_latch: holds the instruction the processor is executing.
//
// Crnt_Instrn_1 is the instruction word, loaded when the control unit takes a
// new word (latch_1). Crnt_Instrn_2 is the word that follows an immediate
// instruction, whose low 16 bits are the immediate value (latch_2). Both are
// broadcast to every processing element. Reset clears both; the cleared
// instruction names PE_ID 0, which no PE carries, so no PE acts on it.
// The two outputs and the latch strobe are named in the document's schematics;
// using the second word for the immediate is this design's reading of them.
// Timing: both registers load on the rising edge while their strobe is high.
module instr_latch
  import modsimd_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               latch_1,
  input  logic               latch_2,
  input  logic [INSTR_W-1:0] instr_in,
  output instr_t             crnt_instrn_1,
  output logic [INSTR_W-1:0] crnt_instrn_2
);

  always_ff @(posedge clk) begin
    if (rst) begin
      crnt_instrn_1 <= '0;
      crnt_instrn_2 <= '0;
    end else begin
      if (latch_1) crnt_instrn_1 <= instr_t'(instr_in);
      if (latch_2) crnt_instrn_2 <= instr_in;
    end
  end

endmodule
