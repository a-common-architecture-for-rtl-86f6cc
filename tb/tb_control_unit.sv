// tb_control_unit: drives the controller with an instruction latch and a
// modelled set of process_done flags. Checks, per instruction class, which
// flags it raises in which cycle, that it waits for every process_done before
// EndOfInstrn, the two-word immediate fetch, waiting for a late instruction
// word, and the cycle count of each instruction (5 cycles from taking the word
// to EndOfInstrn for a register instruction, 6 for an immediate one). Then
// 300 random instructions, random slow PEs and late immediate words, with every
// cycle's flags compared against the sequence expected for the class and mode.
module tb_control_unit;
  import modsimd_pkg::*;
  localparam int N = 10;
  logic clk = 0, rst = 1, instr_valid = 0;
  logic [31:0] instr_in = 0;
  instr_t crnt_instrn;
  logic [31:0] crnt2;
  logic [N-1:0] process_done;
  logic rd_instr, latch_instr_1, latch_instr_2, end_of_instrn, out_valid;
  ctrl_t ctrl;
  logic [2:0] current_state;
  int checks = 0, failures = 0;
  int hold_done;   // cycles the slow PE keeps process_done low after the write step
  int slow_pe = 4;

  control_unit #(.NUM_PE(N)) dut (.*);
  instr_latch u_il (.clk, .rst, .latch_1(latch_instr_1), .latch_2(latch_instr_2), .instr_in,
                    .crnt_instrn_1(crnt_instrn), .crnt_instrn_2(crnt2));

  // process_done model: all low after a latch; high again at the write step,
  // PE 4 later by hold_done cycles.
  int cnt;
  always_ff @(posedge clk) begin
    if (rst) begin process_done <= '1; cnt <= 0; end
    else if (latch_instr_1) begin process_done <= '0; cnt <= -1; end
    else if (current_state == 3'd4) begin
      process_done <= (hold_done == 0) ? '1 : ~(N'(1) << slow_pe); cnt <= hold_done - 1;
    end
    else if (cnt > 0) cnt <= cnt - 1;
    else if (cnt == 0) process_done <= '1;
  end

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  // Runs one instruction; records the ctrl flags seen in each cycle.
  ctrl_t seen [$];
  int cycles;
  task automatic run(logic [31:0] w1, logic [31:0] w2, int gap);
    seen.delete();
    @(negedge clk);
    instr_in = w1; instr_valid = 1;
    #1 check("ready in idle", rd_instr, 1);
    cycles = 0;
    do begin
      seen.push_back(ctrl);
      @(negedge clk); cycles++;
      if (current_state == 3'd1) begin
        instr_valid = 0;
        repeat (gap) begin check("waits for word 2", current_state, 1); seen.push_back(ctrl); @(negedge clk); cycles++; end
        instr_in = w2; instr_valid = 1;
      end else begin
        instr_valid = 0;
      end
      if (cycles > 200) break;
    end while (!end_of_instrn);
    seen.push_back(ctrl);
  endtask

  initial begin
    instr_t w;
    hold_done = 0;
    @(posedge clk); #1 rst = 0;
    check("idle after reset", current_state, 0);
    // ALU instruction: FETCH reads A and B, EXEC latches, WRITE writes C.
    w = make_instr(CLS_ALU, 6'd0, 2'b00, 4'hF, 6'd1, 6'd2, 6'd3);
    run(w, 0, 0);
    check("alu cycles", cycles, 4);
    check("alu fetch", {seen[1].rd_oprnd_a, seen[1].rd_oprnd_b}, 2'b11);
    check("alu exec", {seen[2].latch_result, seen[2].latch_flags, seen[2].use_imm_or_regb}, 3'b110);
    check("alu write", {seen[3].write_regc, seen[3].use_imm_or_alu}, 2'b10);
    check("latched word", crnt_instrn, w);
    // Slow PE: the controller must wait for it.
    hold_done = 6;
    run(w, 0, 0);
    check("wait for slow PE", cycles, 4 + 6);
    hold_done = 0;
    // Immediate operand: two words, operand B from the immediate.
    w = make_instr(CLS_IMM, 6'd0, IMM_OPB, 4'd2, 6'd1, 6'd2, 6'd3);
    run(w, 32'h0000ABCD, 0);
    check("imm cycles", cycles, 5);
    check("imm word", crnt2, 32'h0000ABCD);
    check("imm fetch", {seen[2].rd_oprnd_a, seen[2].rd_oprnd_b}, 2'b10);
    check("imm exec", {seen[3].latch_result, seen[3].use_imm_or_regb}, 2'b11);
    check("imm write", seen[4].write_regc, 1);
    // Late immediate word.
    run(w, 32'h00001111, 3);
    check("imm late cycles", cycles, 8);
    // Load immediate.
    w = make_instr(CLS_IMM, 6'd0, IMM_LOAD, 4'd2, 6'd1, 6'd2, 6'd3);
    run(w, 32'h00002222, 0);
    check("load write", {seen[4].write_regc, seen[4].use_imm_or_alu, seen[3].latch_result}, 3'b110);
    // Read-out: OUT_VALID from EXEC to the end.
    w = make_instr(CLS_BUS, 6'd0, BUS_SEND, 4'hF, 6'd1, 6'd2, 6'd3);
    hold_done = 3;
    run(w, 0, 0);
    check("send exec", seen[2].send_final_output, 1);
    check("send wait", seen[seen.size() - 1].send_final_output, 1);
    check("send fetch quiet", seen[1].send_final_output | seen[1].rd_oprnd_a, 0);
    hold_done = 0;
    // Transfer.
    w = make_instr(CLS_BUS, 6'd0, BUS_XFER, 4'd1, 6'd1, 6'd2, 6'd5);
    run(w, 0, 0);
    check("xfer", {seen[2].send_data_reg, seen[3].send_data_reg, seen[3].write_regc}, 3'b110);
    // Clear.
    w = make_instr(CLS_CTL, 6'd0, CTL_CLR, 4'hF, 6'd0, 6'd0, 6'd0);
    run(w, 0, 0);
    check("clr", {seen[2].reset_alu_regs, seen[3].write_regc}, 2'b10);
    // Random instructions: every cycle's flags against the expected sequence.
    for (int it = 0; it < 300; it++) begin
      ctrl_t exp [$];
      ctrl_t e;
      logic alu, opb, load, send, xfer, clr;
      int gap;
      w = make_instr(2'($urandom), 6'($urandom), 2'($urandom), 4'($urandom), 6'($urandom), 6'($urandom), 6'($urandom));
      gap = (w.cls == CLS_IMM && $urandom % 3 == 0) ? int'($urandom % 4) : 0;
      hold_done = ($urandom % 2) ? int'($urandom % 8) : 0;
      slow_pe = $urandom % N;
      alu  = w.cls == CLS_ALU;
      opb  = w.cls == CLS_IMM && w.mode[0] == 1'b0;
      load = w.cls == CLS_IMM && w.mode[0] == 1'b1;
      send = w.cls == CLS_BUS && w.mode == 2'b00;
      xfer = w.cls == CLS_BUS && w.mode == 2'b01;
      clr  = w.cls == CLS_CTL && w.mode == 2'b01;
      exp.delete();
      e = '0; e.latch_instr = 1; exp.push_back(e);
      if (w.cls == CLS_IMM) repeat (gap + 1) exp.push_back('0);
      e = '0; e.rd_oprnd_a = alu | opb; e.rd_oprnd_b = alu; exp.push_back(e);
      e = '0; e.latch_result = alu | opb; e.latch_flags = alu | opb; e.use_imm_or_regb = opb;
      e.reset_alu_regs = clr; e.send_final_output = send; e.send_data_reg = xfer; exp.push_back(e);
      e = '0; e.write_regc = alu | opb | load; e.use_imm_or_alu = load;
      e.send_final_output = send; e.send_data_reg = xfer; exp.push_back(e);
      e = '0; e.send_final_output = send; e.send_data_reg = xfer;
      repeat (hold_done + 1) exp.push_back(e);
      run(w, 32'($urandom), gap);
      check($sformatf("random %0d cycles", it), seen.size(), exp.size());
      foreach (exp[k])
        if (k < seen.size()) check($sformatf("random %0d cls %0d mode %0d cycle %0d flags", it, w.cls, w.mode, k), seen[k], exp[k]);
      check("random latched word", crnt_instrn, w);
      check("out_valid follows read-out", out_valid, send);
    end
    // No instruction offered: controller stays idle.
    repeat (5) @(negedge clk);
    check("stays idle", {current_state, rd_instr}, {3'd0, 1'b1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
