// tb_chem_workload: the dissimilar-sensor (chemical array) workload.
//
// Every PE is attached to a different chemical sensor. All readings are
// gathered at once under reset (GatherData, common addressing): each PE gets
// two samples of its sensor at addresses 0 and 2 and a baseline at 4. Then the
// machine works in specific addressing:
//   PE 0001 (sensor 1, reacts to analyte A and B): reading - baseline into 1,
//           the carry flag tells whether the response reached the threshold
//           (an immediate compare), i.e. "A or B is present";
//   PE 0010 (sensor 2, reacts to A only): ProcessData(0) -> StoreData(1),
//           ProcessData(2) -> StoreData(3), CompareData(1, 3); then a compare of
//           the processed response with the threshold decides A versus B.
// Every other PE must stay untouched (checked by reading all memories back),
// and the decision is checked for both analytes.
module tb_chem_workload;
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
  int checks = 0, failures = 0;
  logic [15:0] raw [N][6];
  addr_t marks [4] = '{6'd1, 6'd3, 6'd5, 6'd6};

  modsimd_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  bus_word_t got_words [$];
  always @(posedge clk) if (!rst && out_word.valid) got_words.push_back(out_word);

  task automatic word(logic [31:0] w);
    instr = w; instr_valid = 1;
    do @(posedge clk); while (!rd_instr);
    #1 instr_valid = 0;
  endtask
  task automatic finish_instr();
    while (!end_of_instrn) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask
  task automatic alu(alu_op_e o, pe_id_t id, int a, int c, int b);
    word(make_instr(CLS_ALU, o, 2'b00, id, addr_t'(a), addr_t'(c), addr_t'(b))); finish_instr();
  endtask
  task automatic alu_imm(alu_op_e o, pe_id_t id, int a, int c, logic [15:0] imm);
    word(make_instr(CLS_IMM, o, IMM_OPB, id, addr_t'(a), addr_t'(c), 6'd0)); word({16'h0, imm}); finish_instr();
  endtask
  task automatic read(pe_id_t id, int a, output logic [15:0] d);
    got_words.delete();
    word(make_instr(CLS_BUS, 6'd0, BUS_SEND, id, addr_t'(a), 6'd0, 6'd0)); finish_instr();
    @(posedge clk); #1;
    d = got_words.size() == 1 ? got_words[0].data : 16'hDEAD;
  endtask

  task automatic run(bit analyte_a);
    logic [15:0] thr, d;
    logic present, is_a;
    thr = 16'd50;
    rst = 1;
    for (int p = 0; p < N; p++) begin
      raw[p][0] = 16'(200 + $urandom % 50);
      raw[p][2] = 16'(200 + $urandom % 50);
      raw[p][4] = 16'(200);
    end
    raw[0][0] = 16'(300 + $urandom % 20);                       // sensor 1 sees A and B
    raw[1][0] = analyte_a ? 16'(320 + $urandom % 20) : 16'(205); // sensor 2 sees A only
    raw[1][2] = analyte_a ? 16'(300 + $urandom % 20) : 16'(210);
    // GatherData: all sensors at once (one word per port per cycle).
    foreach (raw[0][k]) if (k % 2 == 0) begin
      for (int p = 0; p < N; p++) adc_word[p] = '{valid: 1'b1, pe_id: pe_id_t'(p + 1), addr: 6'(k), data: raw[p][k]};
      @(posedge clk); #1;
    end
    for (int p = 0; p < N; p++) adc_word[p] = '0;
    rst = 0; @(posedge clk); #1;
    // Mark the result addresses of every PE (common addressing, load immediate).
    foreach (marks[k]) begin
      word(make_instr(CLS_IMM, 6'd0, IMM_LOAD, 4'hF, 6'd0, marks[k], 6'd0)); word(32'h0000A5A5); finish_instr();
    end
    // PE 0001: response of sensor 1 against the threshold.
    alu(OP_SUB, 4'd1, 0, 1, 4);
    alu_imm(OP_SUB, 4'd1, 1, 5, thr);
    present = carry_flag[0];
    check("sensor 1 detects a gas", present, 1);
    // PE 0010: process two samples, store, compare.
    alu(OP_SUB, 4'd2, 0, 1, 4);   // ProcessData(address0), StoreData(address1)
    alu(OP_SUB, 4'd2, 2, 3, 4);   // ProcessData(address2), StoreData(address3)
    alu(OP_SUB, 4'd2, 1, 5, 3);   // CompareData(address1, address3)
    check("compare flags", {neg_flag[1], zro_flag[1]},
          {16'(16'(raw[1][0] - raw[1][4]) - 16'(raw[1][2] - raw[1][4])) >= 16'h8000,
           raw[1][0] == raw[1][2]});
    alu_imm(OP_SUB, 4'd2, 1, 6, thr);
    is_a = carry_flag[1];
    check("analyte decision", is_a, analyte_a);
    // Results in PE 2, everything else untouched.
    read(4'd2, 1, d); check("pe2 addr1", d, 16'(raw[1][0] - raw[1][4]));
    read(4'd2, 3, d); check("pe2 addr3", d, 16'(raw[1][2] - raw[1][4]));
    read(4'd1, 1, d); check("pe1 addr1", d, 16'(raw[0][0] - raw[0][4]));
    for (int p = 2; p < N; p++)
      foreach (marks[k]) begin
        read(pe_id_t'(p + 1), marks[k], d);
        check($sformatf("pe%0d addr%0d untouched", p + 1, marks[k]), d, 16'hA5A5);
      end
    check("only PEs 1 and 2 have flags", {carry_flag[9:2], neg_flag[9:2], zro_flag[9:2]}, 0);
  endtask

  initial begin
    run(1'b1);
    run(1'b0);
    $display("decisions made for analyte A and analyte B at %0t", $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
