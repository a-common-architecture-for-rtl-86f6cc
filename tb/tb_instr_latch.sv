// tb_instr_latch: the two instruction registers load only on their own strobe
// and clear on reset.
module tb_instr_latch;
  import modsimd_pkg::*;
  logic clk = 0, rst = 1, latch_1 = 0, latch_2 = 0;
  logic [31:0] instr_in = 0, crnt_instrn_2, m1 = 0, m2 = 0;
  instr_t crnt_instrn_1;
  int checks = 0, failures = 0;

  instr_latch dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1;
    checks++; if (crnt_instrn_1 !== '0 || crnt_instrn_2 !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      instr_in = $urandom; latch_1 = 1'($urandom); latch_2 = 1'($urandom);
      @(posedge clk); #1;
      if (latch_1) m1 = instr_in;
      if (latch_2) m2 = instr_in;
      checks += 2;
      if (32'(crnt_instrn_1) !== m1) begin failures++; $display("FAIL word1 %h %h", crnt_instrn_1, m1); end
      if (crnt_instrn_2 !== m2) begin failures++; $display("FAIL word2"); end
    end
    checks++;
    if (crnt_instrn_1.pe_id !== m1[21:18] || crnt_instrn_1.alu_op !== m1[29:24]) begin
      failures++; $display("FAIL field positions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
