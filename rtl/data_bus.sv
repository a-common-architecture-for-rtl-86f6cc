// data_bus: the shared 16-bit data bus between the processing elements and the
// read-out port.
//
// Each PE that has a word to put on the bus raises bus_req. The bus grants it
// to one PE per cycle, the lowest-numbered one first, so a read-out addressed
// to all PEs (PE_ID 1111) leaves the chip serially, one PE per cycle, and the
// other PEs wait (their process_done stays low) until their turn. The granted
// PE's 27-bit word {valid, PE_ID, local address, data} is carried to bus_out,
// which feeds the read-out register and every PE's receive side.
// The document gives the 16-bit bus, the serial read-out and transfers managed
// by the control unit; the fixed-priority grant is this design's choice.
// Purely combinational.
module data_bus
  import modsimd_pkg::*;
#(
  parameter int NUM_PE = 10
) (
  input  logic      [NUM_PE-1:0] bus_req,
  input  bus_word_t [NUM_PE-1:0] pe_word,
  output logic      [NUM_PE-1:0] bus_grant,
  output bus_word_t              bus_out
);

  // Fixed priority: the lowest-numbered requester wins.
  always_comb begin
    logic found;
    found     = 1'b0;
    bus_grant = '0;
    for (int i = 0; i < NUM_PE; i++) begin
      if (bus_req[i] && !found) begin
        found        = 1'b1;
        bus_grant[i] = 1'b1;
      end
    end
  end

  always_comb begin
    bus_out = '0;
    for (int i = 0; i < NUM_PE; i++)
      if (bus_grant[i]) bus_out = pe_word[i];
  end

  always_comb a_one_grant: assert ($onehot0(bus_grant));

endmodule
