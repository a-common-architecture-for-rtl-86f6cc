// tb_datapath_ctrl: operand/result multiplexers, the shared memory write port,
// bus request, grant and bus word, transfer receive addressing, and the
// process_done handshake for every instruction class.
module tb_datapath_ctrl;
  import modsimd_pkg::*;
  logic clk = 0, rst = 1, do_process = 1, rf_we = 0, bus_grant = 0;
  ctrl_t ctrl = '0;
  instr_t instr = '0;
  data_t imm = 0, reg_port_b = 0, alu_result = 0, oprnd_b, regport_c, rf_wdata = 0, mem_wdata, mem_word_a = 0;
  addr_t rf_waddr = 0, mem_waddr;
  logic mem_we, bus_req, process_done;
  bus_word_t final_output, bus_in = '0;
  int checks = 0, failures = 0;

  datapath_ctrl #(.MY_ID(4'd3)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic new_instr(logic [1:0] cls, logic [1:0] mode, pe_id_t id);
    instr = make_instr(cls, 6'd0, mode, id, 6'd9, 6'd17, 6'd3);
    ctrl = '0; ctrl.latch_instr = 1; @(posedge clk); #1; ctrl = '0;
    check("done cleared", process_done, 0);
  endtask

  initial begin
    @(posedge clk); #1 rst = 0;
    check("done after reset", process_done, 1);
    // Multiplexers.
    for (int i = 0; i < 200; i++) begin
      imm = 16'($urandom); reg_port_b = 16'($urandom); alu_result = 16'($urandom);
      ctrl.use_imm_or_regb = 1'($urandom); ctrl.use_imm_or_alu = 1'($urandom); #1;
      check("oprnd_b", oprnd_b, ctrl.use_imm_or_regb ? imm : reg_port_b);
      check("regport_c", regport_c, ctrl.use_imm_or_alu ? imm : alu_result);
    end
    ctrl = '0;
    // ALU instruction: done on Write_RegC.
    new_instr(CLS_ALU, 2'b00, 4'd3);
    repeat (3) @(posedge clk); #1;
    check("alu not done yet", process_done, 0);
    ctrl.write_regc = 1; rf_we = 1; rf_waddr = 6'd17; rf_wdata = 16'hBEEF; #1;
    check("rf write passes", {mem_we, mem_waddr, mem_wdata}, {1'b1, 6'd17, 16'hBEEF});
    @(posedge clk); #1; ctrl = '0; rf_we = 0;
    check("alu done", process_done, 1);
    // Not addressed: done one cycle after the latch.
    new_instr(CLS_ALU, 2'b00, 4'd7); do_process = 0;
    @(posedge clk); #1;
    check("unaddressed done", process_done, 1);
    do_process = 1;
    // Read-out: request, wait without grant, then send.
    new_instr(CLS_BUS, BUS_SEND, 4'hF);
    mem_word_a = 16'h5A5A;
    ctrl.send_final_output = 1; #1;
    check("bus_req", bus_req, 1);
    check("no word without grant", final_output, 0);
    repeat (3) @(posedge clk); #1;
    check("waiting for grant", process_done, 0);
    bus_grant = 1; #1;
    check("bus word", final_output, {1'b1, 4'd3, 6'd9, 16'h5A5A});
    @(posedge clk); #1; bus_grant = 0;
    check("sent done", process_done, 1);
    check("req dropped", bus_req, 0);
    ctrl = '0;
    // Transfer receive: destination in B[3:0] (3 = this PE) writes mem[C].
    new_instr(CLS_BUS, BUS_XFER, 4'd1); do_process = 0;
    ctrl.send_data_reg = 1;
    bus_in = '{valid: 1'b1, pe_id: 4'd1, addr: 6'd9, data: 16'h1234}; #1;
    check("rx write", {mem_we, mem_waddr, mem_wdata}, {1'b1, 6'd17, 16'h1234});
    check("no req from unaddressed", bus_req, 0);
    instr.addr_b = 6'd4; #1;
    check("rx other dest", mem_we, 0);
    instr.addr_b = 6'd15; #1;
    check("rx common dest", mem_we, 1);
    bus_in = '0; ctrl = '0; do_process = 1;
    // Control instruction completes at once.
    new_instr(CLS_CTL, CTL_CLR, 4'd3);
    @(posedge clk); #1;
    check("ctl done", process_done, 1);
    // Immediate: done on Write_RegC.
    new_instr(CLS_IMM, IMM_LOAD, 4'd3);
    @(posedge clk); #1;
    check("imm waits", process_done, 0);
    ctrl.write_regc = 1; @(posedge clk); #1; ctrl = '0;
    check("imm done", process_done, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
