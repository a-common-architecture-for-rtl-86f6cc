// tb_pe: one processing element (ID 3) driven step by step the way the control
// unit drives it. Loads its memory through acquisition (own port and both
// neighbour ports), runs random register and immediate instructions in common
// and specific addressing, instructions for another PE (which must change
// nothing), a clear, a PE-to-PE receive, and reads memory back over the bus.
// Everything is compared with an array model and tb_ref_pkg::alu_ref.
module tb_pe;
  import modsimd_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, read_input_frm_adc = 0, bus_grant = 0;
  bus_word_t adc_own = '0, adc_up = '0, adc_dn = '0, final_output, bus_in = '0;
  ctrl_t ctrl = '0;
  instr_t crnt_instrn_1 = '0;
  logic [31:0] crnt_instrn_2 = 0;
  logic bus_req, process_done, do_process, carry_flag, neg_flag, zro_flag;
  data_t model [64];
  data_t alu_model = 0;
  logic [2:0] flag_model = 0;
  int checks = 0, failures = 0;

  pe #(.MY_ID(4'd3), .UP_ID(4'd2), .DN_ID(4'd4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic issue(instr_t w, logic [15:0] imm);
    crnt_instrn_1 = w; crnt_instrn_2 = {16'h0, imm};
    ctrl = '0; ctrl.latch_instr = 1; tick(); ctrl = '0;
  endtask

  // Register or immediate instruction, with the model update.
  task automatic exec(instr_t w, logic [15:0] imm);
    logic mine, opb, load;
    logic [16:0] r;
    mine = (w.pe_id == 3 || w.pe_id == 15);
    opb  = (w.cls == CLS_IMM) && !w.mode[0];
    load = (w.cls == CLS_IMM) &&  w.mode[0];
    issue(w, imm);
    ctrl.rd_oprnd_a = 1; ctrl.rd_oprnd_b = (w.cls == CLS_ALU); tick(); ctrl = '0;
    if (!load) begin
      ctrl.latch_result = 1; ctrl.latch_flags = 1; ctrl.use_imm_or_regb = opb; tick(); ctrl = '0;
    end
    ctrl.write_regc = 1; ctrl.use_imm_or_alu = load; tick(); ctrl = '0;
    if (mine) begin
      if (!load) begin
        r = alu_ref(int'(w.alu_op), model[w.addr_a], opb ? imm : model[w.addr_b], alu_model);
        alu_model = r[15:0];
        if (w.alu_op <= 6'd21)
          flag_model = {(w.alu_op == 0 || w.alu_op == 4 || w.alu_op == 5 || w.alu_op == 6) ? r[16] : 1'b0,
                        r[15], r[15:0] == 0};
        else
          flag_model = {1'b0, alu_model[15], alu_model == 0};
        model[w.addr_c] = alu_model;
      end else begin
        model[w.addr_c] = imm;
      end
    end
    check("done", process_done, 1);
    check("flags", {carry_flag, neg_flag, zro_flag}, flag_model);
  endtask

  task automatic read_back(addr_t a);
    issue(make_instr(CLS_BUS, 6'd0, BUS_SEND, 4'd3, a, 6'd0, 6'd0), 0);
    ctrl.send_final_output = 1; #1;
    check("req", bus_req, 1);
    bus_grant = 1; #1;
    check($sformatf("mem[%0d]", a), final_output, {1'b1, 4'd3, a, model[a]});
    tick(); bus_grant = 0; ctrl = '0;
    check("send done", process_done, 1);
  endtask

  initial begin
    instr_t w;
    // Acquisition under reset: own row at 20..29, neighbours' rows.
    read_input_frm_adc = 1;
    for (int i = 0; i < 64; i++) begin
      adc_own = '{valid: 1'b1, pe_id: 4'd3, addr: 6'(i), data: 16'($urandom)};
      model[i] = adc_own.data; tick();
    end
    for (int c = 0; c < 10; c++) begin
      adc_own = '{valid: 1'b1, pe_id: 4'd3, addr: 6'(20 + c), data: 16'(300 + c)};
      adc_up  = '{valid: 1'b1, pe_id: 4'd2, addr: 6'(20 + c), data: 16'(200 + c)};
      adc_dn  = '{valid: 1'b1, pe_id: 4'd4, addr: 6'(20 + c), data: 16'(400 + c)};
      model[20 + c] = 16'(300 + c); model[10 + c] = 16'(200 + c); model[42 + c] = 16'(400 + c);
      tick();
    end
    adc_own = '0; adc_up = '0; adc_dn = '0;
    read_input_frm_adc = 0; rst = 0; tick();
    for (int a = 10; a < 30; a++) read_back(6'(a));
    for (int a = 42; a < 52; a++) read_back(6'(a));
    // Random instructions.
    for (int it = 0; it < 600; it++) begin
      pe_id_t id;
      logic [1:0] cls;
      case ($urandom % 4) 0: id = 4'd3; 1, 2: id = 4'hF; default: id = 4'($urandom); endcase
      cls = ($urandom % 3 == 0) ? CLS_IMM : CLS_ALU;
      w = make_instr(cls, 6'($urandom % 24), 2'($urandom), id, 6'($urandom), 6'($urandom), 6'($urandom));
      exec(w, 16'($urandom));
      check("do_process", do_process, id == 3 || id == 15);
    end
    for (int a = 0; a < 64; a++) read_back(6'(a));
    // Clear from another PE's instruction: ignored; then addressed.
    issue(make_instr(CLS_CTL, 6'd0, CTL_CLR, 4'd5, 6'd0, 6'd0, 6'd0), 0);
    ctrl.reset_alu_regs = 1; tick(); ctrl = '0;
    check("clr ignored", {carry_flag, neg_flag, zro_flag}, flag_model);
    issue(make_instr(CLS_CTL, 6'd0, CTL_CLR, 4'hF, 6'd0, 6'd0, 6'd0), 0);
    ctrl.reset_alu_regs = 1; tick(); ctrl = '0;
    check("clr", {carry_flag, neg_flag, zro_flag}, 0);
    // Receive a transfer from PE 1 into mem[40].
    issue(make_instr(CLS_BUS, 6'd0, BUS_XFER, 4'd1, 6'd5, 6'd40, 6'd3), 0);
    ctrl.send_data_reg = 1; bus_in = '{valid: 1'b1, pe_id: 4'd1, addr: 6'd5, data: 16'hC0DE}; #1;
    check("no req when source is another PE", bus_req, 0);
    tick(); ctrl = '0; bus_in = '0; model[40] = 16'hC0DE;
    read_back(6'd40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
