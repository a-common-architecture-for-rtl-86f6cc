// tb_program_counter: the counter advances by one per taken word, holds
// otherwise, wraps at 2**PC_W and resets to 0.
module tb_program_counter;
  logic clk = 0, rst = 1, inc = 0;
  logic [9:0] pc;
  int checks = 0, failures = 0, model = 0;

  program_counter dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      inc = 1'($urandom);
      @(posedge clk); #1;
      if (inc) model = (model + 1) % 1024;
      checks++;
      if (pc !== 10'(model)) begin failures++; $display("FAIL cycle %0d pc %0d exp %0d", i, pc, model); end
    end
    rst = 1; @(posedge clk); #1 rst = 0;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
