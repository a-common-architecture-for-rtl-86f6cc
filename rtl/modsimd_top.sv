// modsimd_top: the modSIMD processing layer for a thin film sensor array.
//
// One control unit, one instruction latch and one program counter drive
// NUM_PE processing elements (PEs) that sit under the sensor array. PE i
// carries the hard-wired ID i+1. An instruction with PE_ID 1111 runs in every
// PE at once (common addressing, SIMD: one instruction, NUM_PE data items); an
// instruction with a PE's own ID runs in that PE alone (specific addressing,
// the machine acts as a scalar processor on one sensor's data).
//
// Sensor data: each PE has its own vertical port adc_word[i] (the digital
// output of that PE's ADC). While rst is high, PE i stores the words of its own
// port and of the ports of PE i-1 and PE i+1 (nearest-neighbour data), see
// mem_bank. Words addressed to 1111 are taken by every PE that listens to the
// port.
//
// Instructions come in through a valid/ready handshake: a word on instr is
// taken on a cycle where instr_valid and rd_instr are both high; pc is the
// address of the next word. end_of_instrn pulses when every PE has finished the
// instruction. Read-out words leave through out_word one clock after the PE
// that owns the data bus drives it, one PE per cycle.
//
// Defaults follow the document: 10 PEs, 4-bit PE IDs, 64 x 16-bit memory per
// PE, 32-bit instructions. Port shapes, the handshake and neighbour offsets are
// this design's choice.
module modsimd_top
  import modsimd_pkg::*;
#(
  parameter int NUM_PE     = 10,
  parameter int PC_W       = 10,
  parameter int NBR_UP_OFS = -10,
  parameter int NBR_DN_OFS = 22
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [INSTR_W-1:0]     instr,
  input  logic                   instr_valid,
  output logic                   rd_instr,
  output logic [PC_W-1:0]        pc,
  input  bus_word_t [NUM_PE-1:0] adc_word,
  output bus_word_t              out_word,
  output logic                   out_valid,
  output logic                   end_of_instrn,
  output logic [NUM_PE-1:0]      carry_flag,
  output logic [NUM_PE-1:0]      neg_flag,
  output logic [NUM_PE-1:0]      zro_flag,
  output logic [NUM_PE-1:0]      do_process,
  output logic [2:0]             current_state
);

  ctrl_t                  ctrl;
  instr_t                 crnt_instrn_1;
  logic [INSTR_W-1:0]     crnt_instrn_2;
  logic                   latch_1, latch_2;
  logic [NUM_PE-1:0]      process_done, bus_req, bus_grant;
  bus_word_t [NUM_PE-1:0] pe_word;
  bus_word_t              bus;

  control_unit #(.NUM_PE(NUM_PE)) u_cu (
    .clk, .rst,
    .instr_in      (instr),
    .instr_valid,
    .crnt_instrn   (crnt_instrn_1),
    .process_done,
    .rd_instr,
    .latch_instr_1 (latch_1),
    .latch_instr_2 (latch_2),
    .ctrl,
    .end_of_instrn,
    .out_valid,
    .current_state
  );

  instr_latch u_il (
    .clk, .rst,
    .latch_1, .latch_2,
    .instr_in (instr),
    .crnt_instrn_1,
    .crnt_instrn_2
  );

  program_counter #(.PC_W(PC_W)) u_pc (
    .clk, .rst,
    .inc (latch_1 || latch_2),
    .pc
  );

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    bus_word_t up, dn;
    if (i > 0) begin : g_up
      assign up = adc_word[i-1];
    end else begin : g_up_edge
      assign up = '0;
    end
    if (i < NUM_PE - 1) begin : g_dn
      assign dn = adc_word[i+1];
    end else begin : g_dn_edge
      assign dn = '0;
    end

    pe #(
      .MY_ID      (pe_id_t'(i + 1)),
      .UP_ID      (pe_id_t'(i)),
      .DN_ID      (pe_id_t'(i + 2)),
      .NBR_UP_OFS (NBR_UP_OFS),
      .NBR_DN_OFS (NBR_DN_OFS)
    ) u_pe (
      .clk, .rst,
      .read_input_frm_adc (rst),
      .adc_own       (adc_word[i]),
      .adc_up        (up),
      .adc_dn        (dn),
      .ctrl,
      .crnt_instrn_1,
      .crnt_instrn_2,
      .bus_req       (bus_req[i]),
      .bus_grant     (bus_grant[i]),
      .final_output  (pe_word[i]),
      .bus_in        (bus),
      .process_done  (process_done[i]),
      .do_process    (do_process[i]),
      .carry_flag    (carry_flag[i]),
      .neg_flag      (neg_flag[i]),
      .zro_flag      (zro_flag[i])
    );
  end

  data_bus #(.NUM_PE(NUM_PE)) u_bus (
    .bus_req, .pe_word, .bus_grant,
    .bus_out (bus)
  );

  always_ff @(posedge clk) begin
    if (rst)                         out_word <= '0;
    else if (ctrl.send_final_output) out_word <= bus;
    else                             out_word <= '0;
  end

  // The 4-bit ID space holds 14 PEs besides the unused ID 0 and the common 1111.
  initial assert (NUM_PE >= 1 && NUM_PE <= 14);

endmodule
