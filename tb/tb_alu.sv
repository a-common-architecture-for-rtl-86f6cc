// tb_alu: self-checking test of the PE ALU.
// Replays the documented ALU waveform (add with do_process high, hold with
// do_process low, add again), then checks every operation code on random
// operands against tb_ref_pkg::alu_ref, the flags, the do_process hold,
// Latch_Flags without Latch_Result, and Reset_AluRegs.
module tb_alu;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, reset_alu_regs = 0, do_process = 0, latch_result = 0, latch_flags = 0;
  logic [5:0] alu_op = 0;
  logic [15:0] a = 0, b = 0, result;
  logic carry_flag, neg_flag, zro_flag;
  int checks = 0, failures = 0;

  alu dut (.*, .oprnd_a(a), .oprnd_b(b));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic step(int op, logic [15:0] aa, logic [15:0] bb, logic dp, logic lr, logic lf);
    alu_op = 6'(op); a = aa; b = bb; do_process = dp; latch_result = lr; latch_flags = lf;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [16:0] exp;
    logic [15:0] prev;
    logic pc, pn, pz;
    @(posedge clk); #1 rst = 0;
    // Documented waveform: 0000 + 0008 = 0008; op 01 with do_process low holds;
    // 0800 + 0008 = 0808; 0900 + 1008 = 1908.
    step(0, 16'h0000, 16'h0008, 1, 1, 1); check("wave add1", result, 16'h0008);
    step(1, 16'h2000, 16'h0008, 0, 1, 1); check("wave hold", result, 16'h0008);
    step(0, 16'h0800, 16'h0008, 1, 1, 1); check("wave add2", result, 16'h0808);
    step(0, 16'h0900, 16'h1008, 1, 1, 1); check("wave add3", result, 16'h1908);
    // Every op code, random operands.
    for (int it = 0; it < 40; it++) begin
      for (int op = 0; op < 64; op++) begin
        logic [15:0] ra, rb;
        ra = 16'($urandom); rb = 16'($urandom);
        if (it == 0) begin ra = 16'h8000; rb = 16'h8000; end
        prev = result;
        exp = alu_ref(op, ra, rb, prev);
        step(op, ra, rb, 1, 1, 1);
        check($sformatf("op%0d result", op), result, exp[15:0]);
        check($sformatf("op%0d neg", op), neg_flag, exp[15]);
        check($sformatf("op%0d zero", op), zro_flag, exp[15:0] == 0);
        if (op == 0 || op == 4 || op == 5 || op == 6)
          check($sformatf("op%0d carry", op), carry_flag, exp[16]);
        else if (op <= 21)
          check($sformatf("op%0d carry", op), carry_flag, 0);
      end
    end
    // do_process low: nothing changes.
    prev = result; pc = carry_flag; pn = neg_flag; pz = zro_flag;
    step(21, 16'h1234, 16'h4321, 0, 1, 1);
    check("hold result", result, prev);
    check("hold flags", {carry_flag, neg_flag, zro_flag}, {pc, pn, pz});
    // Latch_Flags alone: flags follow, result holds.
    step(7, 16'h1234, 16'h4321, 1, 0, 1);
    check("flags-only result", result, prev);
    check("flags-only zero", zro_flag, 1);
    // Reset_AluRegs is ignored without do_process, clears with it.
    step(21, 0, 0, 1, 1, 1);
    reset_alu_regs = 1; step(21, 0, 0, 0, 0, 0);
    check("reset ignored", result, 16'hFFFF);
    step(21, 0, 0, 1, 0, 0);
    check("reset_alu_regs", {result, carry_flag, neg_flag, zro_flag}, 0);
    reset_alu_regs = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
