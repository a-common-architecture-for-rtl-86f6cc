// pe_id_decode: decides whether this processing element executes the current
// instruction.
//
// Every PE carries a hard-wired 4-bit identifier (MY_ID). do_process is high
// when the instruction's PE_ID field (bits [21:18]) equals MY_ID (specific
// addressing: one PE acts, the others do not react) or equals the common ID
// 1111 (common addressing: every PE acts, SIMD operation). do_process goes to
// the ALU, the register file, the memory write path and the datapath
// controller. Purely combinational.
module pe_id_decode
  import modsimd_pkg::*;
#(
  parameter pe_id_t MY_ID = 4'd1
) (
  input  pe_id_t instr_pe_id,
  output logic   do_process
);

  assign do_process = (instr_pe_id == MY_ID) || (instr_pe_id == COMMON_ID);

endmodule
