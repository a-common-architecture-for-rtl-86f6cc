// mem_bank: the local memory of one processing element (64 words of 16 bits).
//
// Data acquisition: while acq_en is high (the processor's global reset), the
// bank stores the sensor words that reach it through the vertical interconnect.
// A word is {valid, PE_ID, local address, data}. The PE's own port word is
// stored at its local address when its PE_ID is this PE's ID or the common ID
// 1111. The words on the two neighbouring PEs' ports are stored as well, at
// their local address plus NBR_UP_OFS or NBR_DN_OFS (modulo 64), when addressed
// to that neighbour or to 1111. That is how each PE keeps the sensor data
// of its nearest neighbours without using the data bus. The document says that
// acquisition happens under global reset and that neighbour data is kept
// locally; the port-per-neighbour arrangement and the offsets are this design's
// choice. With the defaults, a PE that gets its own row of ten sensors at
// addresses 20..29 keeps the row above at 10..19 and the row below at 42..51:
// the 30 sensor values per PE that the document calls for.
//
// Priority when several writes hit the same word in one cycle: own port,
// then upper, then lower neighbour. Outside acquisition there is one write
// port (results and bus transfers). Three combinational read ports: operands
// A and B, and the word for the data bus (same address as A).
//
// Timing: writes on the rising edge; reads are combinational. The array is not
// reset: acquisition fills it.
module mem_bank
  import modsimd_pkg::*;
#(
  parameter int     DEPTH      = 64,
  parameter pe_id_t MY_ID      = 4'd1,
  parameter pe_id_t UP_ID      = 4'd0,
  parameter pe_id_t DN_ID      = 4'd2,
  parameter int     NBR_UP_OFS = -10,
  parameter int     NBR_DN_OFS = 22
) (
  input  logic      clk,
  input  logic      acq_en,
  input  bus_word_t adc_own,
  input  bus_word_t adc_up,
  input  bus_word_t adc_dn,
  input  addr_t     rd_addr_a,
  input  addr_t     rd_addr_b,
  output data_t     rd_data_a,
  output data_t     rd_data_b,
  input  logic      we,
  input  addr_t     waddr,
  input  data_t     wdata
);

  localparam addr_t UP_OFS = addr_t'(NBR_UP_OFS);
  localparam addr_t DN_OFS = addr_t'(NBR_DN_OFS);

  data_t mem [DEPTH];

  logic own_hit, up_hit, dn_hit;
  assign own_hit = adc_own.valid && (adc_own.pe_id == MY_ID || adc_own.pe_id == COMMON_ID);
  assign up_hit  = adc_up.valid  && (adc_up.pe_id  == UP_ID || adc_up.pe_id  == COMMON_ID);
  assign dn_hit  = adc_dn.valid  && (adc_dn.pe_id  == DN_ID || adc_dn.pe_id  == COMMON_ID);

  always_ff @(posedge clk) begin
    if (acq_en) begin
      // Later statements win: lower neighbour first, own port last.
      if (dn_hit)  mem[addr_t'(adc_dn.addr + DN_OFS)] <= adc_dn.data;
      if (up_hit)  mem[addr_t'(adc_up.addr + UP_OFS)] <= adc_up.data;
      if (own_hit) mem[adc_own.addr] <= adc_own.data;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rd_data_a = mem[rd_addr_a];
  assign rd_data_b = mem[rd_addr_b];

endmodule
