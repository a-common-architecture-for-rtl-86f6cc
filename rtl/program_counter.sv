// program_counter: the processor's one program counter.
//
// It holds the address of the next instruction word to be taken from the
// instruction source and advances by one for every word the control unit
// takes (instruction and immediate words alike). The document names a single
// program counter for the whole chip but describes no branch instructions, so
// the counter only counts; its width (PC_W) is this design's choice.
// Timing: pc changes on the rising edge after a word is taken; reset sets 0.
module program_counter #(
  parameter int PC_W = 10
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            inc,
  output logic [PC_W-1:0] pc
);

  always_ff @(posedge clk) begin
    if (rst)      pc <= '0;
    else if (inc) pc <= pc + 1'b1;
  end

endmodule
