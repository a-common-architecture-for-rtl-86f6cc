// modsimd_pkg: types and constants shared by the modSIMD processing layer.
//
// The processor is a non-pipelined machine with 32-bit instructions and 16-bit
// data. One control unit broadcasts each instruction to every processing element
// (PE). An instruction either names one PE by its 4-bit PE_ID (specific
// addressing, the PEs behave as one scalar processor) or carries the common ID
// 4'b1111 (common addressing, every PE executes it: SIMD).
//
// Instruction word (field positions as documented for the processor):
//   [31:30] class     decoded by the control unit
//   [29:24] ALU_OP    passed unchanged to every ALU
//   [23:22] mode      decoded by the control unit
//   [21:18] PE_ID     1111 = all PEs
//   [17:12] address of operand A
//   [11:6]  address of the result (register C)
//   [5:0]   address of operand B
// The meaning of the class and mode codes is this design's own choice (see
// class_e / mode constants below): the source only says that these bits select
// between ALU and immediate operations. An immediate instruction is followed by
// a second word whose low 16 bits are the immediate value.
//
// Bus word (27 bits, bit 26 down to 0): {valid, PE_ID, local address, data}.
// The 10-bit address {PE_ID, local address} names any memory element of the chip.
package modsimd_pkg;

  localparam int DATA_W    = 16;
  localparam int INSTR_W   = 32;
  localparam int ADDR_W    = 6;
  localparam int ID_W      = 4;
  localparam int MEM_DEPTH = 64;
  localparam int BUS_W     = 1 + ID_W + ADDR_W + DATA_W;  // 27

  localparam logic [ID_W-1:0] COMMON_ID = 4'b1111;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [ID_W-1:0]   pe_id_t;

  // ALU operations, numbered in the order of the documented operation list;
  // OP_ADD = 0 agrees with the documented ALU simulation.
  typedef enum logic [5:0] {
    OP_ADD           = 6'd0,
    OP_A             = 6'd1,
    OP_AP            = 6'd2,
    OP_APP           = 6'd3,
    OP_SUB           = 6'd4,
    OP_LEFT_SHIFT    = 6'd5,
    OP_RIGHT_SHIFT   = 6'd6,
    OP_ALL_ZEROS     = 6'd7,
    OP_A_AND_B       = 6'd8,
    OP_NOTA_AND_B    = 6'd9,
    OP_B             = 6'd10,
    OP_NOTA_AND_NOTB = 6'd11,
    OP_A_XNOR_B      = 6'd12,
    OP_NOTA          = 6'd13,
    OP_NOTA_OR_B     = 6'd14,
    OP_A_AND_NOTB    = 6'd15,
    OP_A_XOR_B       = 6'd16,
    OP_A_OR_B        = 6'd17,
    OP_NOTB          = 6'd18,
    OP_A_OR_NOTB     = 6'd19,
    OP_A_NAND_B      = 6'd20,
    OP_ALL_ONES      = 6'd21
  } alu_op_e;

  // Instruction classes (bits [31:30]).
  typedef enum logic [1:0] {
    CLS_ALU = 2'b00,  // C = ALU(A, B), all three in local memory
    CLS_IMM = 2'b01,  // two-word immediate instruction
    CLS_BUS = 2'b10,  // data bus: read-out or PE-to-PE transfer
    CLS_CTL = 2'b11   // no operation / clear ALU registers
  } class_e;

  // Mode bits [23:22] per class.
  localparam logic [1:0] IMM_OPB  = 2'b00;  // C = ALU(A, imm)
  localparam logic [1:0] IMM_LOAD = 2'b01;  // C = imm
  localparam logic [1:0] BUS_SEND = 2'b00;  // put mem[A] on the bus to the read-out port
  localparam logic [1:0] BUS_XFER = 2'b01;  // source mem[A] -> mem[C] of PE named in B[3:0]
  localparam logic [1:0] CTL_NOP  = 2'b00;
  localparam logic [1:0] CTL_CLR  = 2'b01;  // reset ALU result and flags

  typedef struct packed {
    logic [1:0]  cls;
    logic [5:0]  alu_op;
    logic [1:0]  mode;
    pe_id_t      pe_id;
    addr_t       addr_a;
    addr_t       addr_c;
    addr_t       addr_b;
  } instr_t;

  typedef struct packed {
    logic   valid;
    pe_id_t pe_id;
    addr_t  addr;
    data_t  data;
  } bus_word_t;

  // Flags the control unit broadcasts to every PE.
  typedef struct packed {
    logic latch_instr;       // a new first instruction word is being taken
    logic rd_oprnd_a;
    logic rd_oprnd_b;
    logic latch_result;
    logic latch_flags;
    logic write_regc;
    logic use_imm_or_alu;    // 1: value written to C is the immediate
    logic use_imm_or_regb;   // 1: ALU operand B is the immediate
    logic reset_alu_regs;
    logic send_final_output; // read-out over the data bus
    logic send_data_reg;     // PE-to-PE transfer over the data bus
  } ctrl_t;

  function automatic instr_t make_instr(logic [1:0] cls, logic [5:0] op, logic [1:0] mode,
                                        pe_id_t id, addr_t a, addr_t c, addr_t b);
    return '{cls: cls, alu_op: op, mode: mode, pe_id: id, addr_a: a, addr_c: c, addr_b: b};
  endfunction

endpackage
