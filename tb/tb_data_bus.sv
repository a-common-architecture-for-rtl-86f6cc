// tb_data_bus: random request patterns; the grant must go to the lowest
// requesting PE only, and the bus must carry that PE's word (zero when idle).
module tb_data_bus;
  import modsimd_pkg::*;
  localparam int N = 10;
  logic [N-1:0] bus_req, bus_grant;
  bus_word_t [N-1:0] pe_word;
  bus_word_t bus_out;
  int checks = 0, failures = 0;

  data_bus #(.NUM_PE(N)) dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int first;
      bus_req = N'($urandom);
      if (it % 7 == 0) bus_req = '0;
      for (int i = 0; i < N; i++) pe_word[i] = 27'($urandom);
      #1;
      first = -1;
      for (int i = N - 1; i >= 0; i--) if (bus_req[i]) first = i;
      checks += 2;
      if (first < 0) begin
        if (bus_grant !== '0 || bus_out !== '0) begin failures++; $display("FAIL idle"); end
        checks--;
      end else begin
        if (bus_grant !== (N'(1) << first)) begin failures++; $display("FAIL grant %b req %b", bus_grant, bus_req); end
        if (bus_out !== pe_word[first]) begin failures++; $display("FAIL word"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
