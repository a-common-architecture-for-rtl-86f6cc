// tb_sobel_workload: the edge-detection workload on a 10 x 10 sensor image,
// at the processor's default size (10 PEs, one image row per PE).
//
// Under reset every PE receives its own row (addresses 20..29) and, through
// the neighbour ports, the rows above (10..19) and below (42..51). Then, for
// every interior column j = 1..8, all PEs together (PE_ID 1111):
//   GetData   - nine OP_A copies put the 3 x 3 window around column j at
//               addresses 1..9 (row above 1..3, own row 4..6, row below 7..9);
//   routine   - the nine-instruction edge-detection routine of the processor's
//               application notes (right shifts of the edge-centre pixels into
//               34, 36, 40, 38, then the additions and the subtraction into
//               33, 35, 39, 41 and 37), run exactly as listed;
//   read-out  - address 37 of all PEs leaves serially.
// Each result is compared with a software model of the same instruction list,
// so every PE's ten pixels of a column come out of one instruction stream.
// Cycle counts: every instruction of the loop must take 5 cycles (word taken
// to EndOfInstrn), so a column costs 18 x 5 cycles plus a 10-cycle read-out.
module tb_sobel_workload;
  import modsimd_pkg::*;
  localparam int N = 10;
  logic clk = 0, rst = 1, instr_valid = 0;
  logic [31:0] instr = 0;
  logic rd_instr, out_valid, end_of_instrn;
  logic [9:0] pc;
  bus_word_t [N-1:0] adc_word;
  bus_word_t out_word;
  logic [N-1:0] carry_flag, neg_flag, zro_flag, do_process;
  logic [2:0] current_state;
  int checks = 0, failures = 0, instrs = 0;
  logic [15:0] img [N][10];
  logic [15:0] m [N][64];   // model of every PE's memory

  modsimd_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  bus_word_t got_words [$];
  always @(posedge clk) if (!rst && out_word.valid) got_words.push_back(out_word);

  // Issue one single-word instruction; returns cycles from taking it to EndOfInstrn.
  task automatic issue(instr_t w, output int cyc);
    instr = w; instr_valid = 1;
    do @(posedge clk); while (!rd_instr);
    #1 instr_valid = 0; cyc = 0;
    while (!end_of_instrn) begin @(posedge clk); #1; cyc++; end
    @(posedge clk); #1;
    instrs++;
  endtask

  task automatic op(alu_op_e o, int a, int c, int b);
    int cyc;
    logic [16:0] r;
    issue(make_instr(CLS_ALU, o, 2'b00, 4'hF, addr_t'(a), addr_t'(c), addr_t'(b)), cyc);
    check("instruction cycles", cyc, 3);  // take, FETCH, EXEC, WRITE, WAIT: 5 cycles
    for (int p = 0; p < N; p++) begin
      case (o)
        OP_A:           m[p][c] = m[p][a];
        OP_ADD:         m[p][c] = m[p][a] + m[p][b];
        OP_SUB:         m[p][c] = m[p][a] - m[p][b];
        OP_RIGHT_SHIFT: m[p][c] = m[p][a] >> 1;
        default:        $display("model lacks op %0d", o);
      endcase
    end
  endtask

  initial begin
    int cyc, t0;
    for (int r = 0; r < N; r++) for (int c = 0; c < 10; c++) img[r][c] = 16'($urandom % 256);
    // Clear every memory (common ID reaches the port's PE and its neighbours).
    for (int a = 0; a < 64; a++) begin
      for (int p = 0; p < N; p++) adc_word[p] = '{valid: 1'b1, pe_id: 4'hF, addr: 6'(a), data: 16'h0};
      @(posedge clk); #1;
    end
    for (int p = 0; p < N; p++) for (int a = 0; a < 64; a++) m[p][a] = 0;
    // Image rows.
    for (int c = 0; c < 10; c++) begin
      for (int p = 0; p < N; p++) adc_word[p] = '{valid: 1'b1, pe_id: pe_id_t'(p + 1), addr: 6'(20 + c), data: img[p][c]};
      for (int p = 0; p < N; p++) begin
        m[p][20 + c] = img[p][c];
        if (p > 0)     m[p][10 + c] = img[p-1][c];
        if (p < N - 1) m[p][42 + c] = img[p+1][c];
      end
      @(posedge clk); #1;
    end
    for (int p = 0; p < N; p++) adc_word[p] = '0;
    rst = 0; @(posedge clk); #1;
    t0 = 0;
    for (int j = 1; j <= 8; j++) begin
      int start;
      start = $time;
      // GetData: the 3 x 3 window.
      for (int k = 0; k < 3; k++) begin
        op(OP_A, 10 + j - 1 + k, 1 + k, 0);
        op(OP_A, 20 + j - 1 + k, 4 + k, 0);
        op(OP_A, 42 + j - 1 + k, 7 + k, 0);
      end
      // The routine, operands in the order A, C, B.
      op(OP_RIGHT_SHIFT, 6'b000010, 6'b100010, 0);
      op(OP_RIGHT_SHIFT, 6'b000100, 6'b100100, 0);
      op(OP_RIGHT_SHIFT, 6'b001000, 6'b101000, 0);
      op(OP_RIGHT_SHIFT, 6'b000110, 6'b100110, 0);
      op(OP_ADD, 6'b000001, 6'b100001, 6'b000011);
      op(OP_ADD, 6'b100011, 6'b100011, 6'b100010);
      op(OP_ADD, 6'b000111, 6'b100111, 6'b001001);
      op(OP_ADD, 6'b100111, 6'b101001, 6'b101000);
      op(OP_SUB, 6'b100010, 6'b100101, 6'b101000);
      // Read-out of the result word of all ten PEs.
      got_words.delete();
      issue(make_instr(CLS_BUS, 6'd0, BUS_SEND, 4'hF, 6'd37, 6'd0, 6'd0), cyc);
      @(posedge clk); #1;
      check("read-out words", got_words.size(), N);
      for (int p = 0; p < N && p < got_words.size(); p++)
        check($sformatf("col %0d row %0d", j, p), got_words[p], {1'b1, pe_id_t'(p + 1), 6'd37, m[p][37]});
      // Other routine outputs, for PE 4.
      foreach (m[4][a]) if (a >= 33 && a <= 41) begin
        got_words.delete();
        issue(make_instr(CLS_BUS, 6'd0, BUS_SEND, 4'd5, addr_t'(a), 6'd0, 6'd0), cyc);
        @(posedge clk); #1;
        check($sformatf("col %0d pe4 addr %0d", j, a), got_words.size() ? got_words[0].data : 16'hDEAD, m[4][a]);
      end
    end
    $display("instructions issued: %0d for 8 columns x 10 rows", instrs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
