// tb_modsimd_top: end-to-end test of the modSIMD processor at its default size
// (10 PEs, 64 words each).
//
// 1. Acquisition: under reset, a 10 x 10 sensor image arrives one row per PE
//    (own row at 20..29); every PE must also hold the rows above (10..19) and
//    below (42..51). Other words fill the rest of each memory.
// 2. A random program of register, immediate-operand and load-immediate
//    instructions in common (1111) and specific addressing, clears,
//    PE-to-PE transfers and read-outs, offered with random gaps, against a
//    model of all ten memories, ALU registers and flags.
// 3. Serial read-out of one address from all PEs, which must leave in PE order
//    one word per cycle while the other PEs wait for the bus.
// Cycle counts are checked: a register instruction ends 4 cycles after the
// cycle its word is taken when the next word is offered at once, and ten
// additions (one per PE) need a single instruction. The documented example
// word 32'h003C0402 (all PEs: mem[16] = mem[0] + mem[2]) is run as given.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_modsimd_top;
  import modsimd_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 10;
  logic clk = 0, rst = 1, instr_valid = 0;
  logic [31:0] instr = 0;
  logic rd_instr, out_valid, end_of_instrn;
  logic [9:0] pc;
  bus_word_t [N-1:0] adc_word;
  bus_word_t out_word;
  logic [N-1:0] carry_flag, neg_flag, zro_flag, do_process;
  logic [2:0] current_state;

  data_t mem_m [N][64];
  data_t alu_m [N];
  logic [2:0] flag_m [N];
  int checks = 0, failures = 0, words_sent = 0;
  int n_common = 0, n_specific = 0, n_imm_opb = 0, n_imm_load = 0, n_readout = 0,
      n_bus_wait = 0, n_xfer = 0, n_clear = 0, n_nbr = 0, n_instr_gap = 0, n_unaddressed = 0;

  modsimd_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // Read-out words, collected as they leave.
  bus_word_t got_words [$];
  always @(posedge clk) if (!rst && out_word.valid) got_words.push_back(out_word);
  // Count cycles where some PE wants the bus but waits.
  always @(posedge clk) if (!rst && $countones(dut.bus_req) > 1) n_bus_wait++;

  // Offer one word; returns the cycle count until it is taken.
  task automatic offer(logic [31:0] w, int gap);
    if (gap > 0) begin
      instr_valid = 0;
      repeat (gap) @(negedge clk);
      n_instr_gap++;
    end
    instr = w; instr_valid = 1;
    do @(posedge clk); while (!rd_instr);
    #1 instr_valid = 0;
  endtask

  task automatic wait_end(output int cyc);
    cyc = 0;
    while (!end_of_instrn) begin @(negedge clk); cyc++; end
    @(posedge clk); #1;
  endtask

  // Acquisition rule, one cycle: PE p stores its own port's word at its
  // address, PE p-1's word at address - 10 and PE p+1's word at address + 22
  // (each only when addressed to that port's PE or to 1111); own port first,
  // then the upper neighbour, then the lower one.
  function automatic logic hit(bus_word_t w, int id);
    return w.valid && (w.pe_id == pe_id_t'(id) || w.pe_id == 4'hF);
  endfunction

  task automatic acq_model();
    for (int p = 0; p < N - 1; p++)
      if (hit(adc_word[p+1], p + 2)) begin mem_m[p][6'(adc_word[p+1].addr + 22)] = adc_word[p+1].data; n_nbr++; end
    for (int p = 1; p < N; p++)
      if (hit(adc_word[p-1], p)) begin mem_m[p][6'(adc_word[p-1].addr - 10)] = adc_word[p-1].data; n_nbr++; end
    for (int p = 0; p < N; p++)
      if (hit(adc_word[p], p + 1)) mem_m[p][adc_word[p].addr] = adc_word[p].data;
  endtask

  function automatic logic mine(int p, pe_id_t id);
    return id == 15 || id == pe_id_t'(p + 1);
  endfunction

  task automatic run_alu(instr_t w, logic [15:0] imm, int gap, output int cyc);
    logic opb, load;
    opb  = (w.cls == CLS_IMM) && !w.mode[0];
    load = (w.cls == CLS_IMM) &&  w.mode[0];
    offer(w, gap);
    if (w.cls == CLS_IMM) offer({16'h0, imm}, ($urandom % 4 == 0) ? 2 : 0);
    wait_end(cyc);
    if (w.pe_id == 15) n_common++; else n_specific++;
    if (opb) n_imm_opb++;
    if (load) n_imm_load++;
    for (int p = 0; p < N; p++) begin
      if (!mine(p, w.pe_id)) n_unaddressed++;
      else if (load) mem_m[p][w.addr_c] = imm;
      else begin
        logic [16:0] r;
        r = alu_ref(int'(w.alu_op), mem_m[p][w.addr_a], opb ? imm : mem_m[p][w.addr_b], alu_m[p]);
        alu_m[p] = r[15:0];
        flag_m[p] = {(w.alu_op == 0 || w.alu_op == 4 || w.alu_op == 5 || w.alu_op == 6) ? r[16] : 1'b0,
                     r[15], r[15:0] == 0};
        mem_m[p][w.addr_c] = alu_m[p];
      end
    end
    for (int p = 0; p < N; p++)
      check($sformatf("flags pe%0d op %0d cls %0d id %0d", p, w.alu_op, w.cls, w.pe_id), {carry_flag[p], neg_flag[p], zro_flag[p]}, flag_m[p]);
  endtask

  task automatic readout(pe_id_t id, addr_t a);
    int cyc, k;
    got_words.delete();
    offer(make_instr(CLS_BUS, 6'd0, BUS_SEND, id, a, 6'd0, 6'd0), 0);
    wait_end(cyc);
    @(posedge clk); #1;
    n_readout++;
    k = 0;
    for (int p = 0; p < N; p++) begin
      if (!mine(p, id)) continue;
      if (k < got_words.size())
        check($sformatf("readout pe%0d addr%0d", p, a), got_words[k],
              {1'b1, pe_id_t'(p + 1), a, mem_m[p][a]});
      else check("readout word missing", 0, 1);
      k++;
    end
    check("readout count", got_words.size(), k);
    words_sent += k;
  endtask

  task automatic transfer(int src, int dst, addr_t a, addr_t c);
    int cyc;
    pe_id_t d;
    d = (dst < 0) ? 4'hF : pe_id_t'(dst + 1);
    offer(make_instr(CLS_BUS, 6'd0, BUS_XFER, pe_id_t'(src + 1), a, c, {2'b00, d}), 0);
    wait_end(cyc);
    for (int p = 0; p < N; p++)
      if (mine(p, d)) mem_m[p][c] = mem_m[src][a];
    n_xfer++;
  endtask

  initial begin
    int cyc;
    instr_t w;
    // ---- acquisition under reset
    for (int p = 0; p < N; p++) begin alu_m[p] = 0; flag_m[p] = 0; end
    for (int a = 0; a < 64; a++) begin
      for (int p = 0; p < N; p++)
        adc_word[p] = '{valid: 1'b1, pe_id: pe_id_t'(p + 1), addr: 6'(a), data: 16'($urandom)};
      acq_model();
      @(posedge clk); #1;
    end
    for (int c = 0; c < 10; c++) begin
      for (int p = 0; p < N; p++)
        adc_word[p] = '{valid: 1'b1, pe_id: pe_id_t'(p + 1), addr: 6'(20 + c), data: 16'(100 * p + c)};
      acq_model();
      @(posedge clk); #1;
    end
    for (int p = 0; p < N; p++) adc_word[p] = '0;
    rst = 0;
    @(posedge clk); #1;
    check("pc after reset", pc, 0);
    // Neighbour rows read back from PE 4 (ID 5).
    for (int a = 10; a < 52; a++) if (a < 30 || a >= 42) readout(4'd5, 6'(a));
    // ---- ten additions in one instruction, timed
    w = make_instr(CLS_ALU, 6'd0, 2'b00, 4'hF, 6'd20, 6'd60, 6'd21);
    run_alu(w, 0, 0, cyc);
    check("ALU instruction cycles", cyc, 4);
    readout(4'hF, 6'd60);
    check("serial read-out of 10 PEs produced 10 words", got_words.size(), 10);
    // The documented example: every PE adds address 0 and address 2 into 16.
    w = instr_t'(32'h003C_0402);
    check("example decodes", {w.cls, w.alu_op, w.pe_id, w.addr_a, w.addr_c, w.addr_b},
          {2'b00, 6'd0, 4'hF, 6'd0, 6'd16, 6'd2});
    run_alu(w, 0, 0, cyc);
    readout(4'hF, 6'd16);
    // ---- random program
    for (int it = 0; it < 400; it++) begin
      int kind;
      pe_id_t id;
      kind = $urandom % 20;
      case ($urandom % 3) 0: id = 4'hF; 1: id = pe_id_t'($urandom % N + 1); default: id = 4'($urandom); endcase
      if (kind < 12) begin
        w = make_instr(CLS_ALU, 6'($urandom % 23), 2'b00, id, 6'($urandom), 6'($urandom), 6'($urandom));
        run_alu(w, 0, ($urandom % 5 == 0) ? 3 : 0, cyc);
        if (cyc != 4) check("ALU instruction cycles", cyc, 4);
      end else if (kind < 16) begin
        w = make_instr(CLS_IMM, 6'($urandom % 23), 2'($urandom), id, 6'($urandom), 6'($urandom), 6'($urandom));
        run_alu(w, 16'($urandom), 0, cyc);
      end else if (kind < 17) begin
        offer(make_instr(CLS_CTL, 6'd0, CTL_CLR, id, 6'd0, 6'd0, 6'd0), 0);
        wait_end(cyc);
        for (int p = 0; p < N; p++) if (mine(p, id)) begin alu_m[p] = 0; flag_m[p] = 0; end
        n_clear++;
        for (int p = 0; p < N; p++)
          check("flags after clear", {carry_flag[p], neg_flag[p], zro_flag[p]}, flag_m[p]);
      end else if (kind < 18) begin
        transfer($urandom % N, ($urandom % 3 == 0) ? -1 : int'($urandom % N), 6'($urandom), 6'($urandom));
      end else begin
        readout(id, 6'($urandom));
      end
      for (int p = 0; p < N; p++)
        check($sformatf("flags pe%0d after kind %0d it %0d", p, kind, it), {carry_flag[p], neg_flag[p], zro_flag[p]}, flag_m[p]);
    end
    // ---- final comparison of every memory word
    for (int a = 0; a < 64; a++) readout(4'hF, 6'(a));
    check("pc counts words", 1, pc != 0);
    $display("common=%0d specific=%0d imm_opb=%0d imm_load=%0d readout=%0d bus_wait=%0d xfer=%0d clear=%0d nbr=%0d gap=%0d unaddressed=%0d words=%0d",
             n_common, n_specific, n_imm_opb, n_imm_load, n_readout, n_bus_wait, n_xfer, n_clear, n_nbr, n_instr_gap, n_unaddressed, words_sent);
    if (n_common == 0 || n_specific == 0 || n_imm_opb == 0 || n_imm_load == 0 || n_readout == 0 ||
        n_bus_wait == 0 || n_xfer == 0 || n_clear == 0 || n_nbr == 0 || n_instr_gap == 0 || n_unaddressed == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
