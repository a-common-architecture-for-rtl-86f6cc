// tb_pe_id_decode: exhaustive test of the PE_ID decoder for several hard-wired
// IDs: do_process must be high exactly for the PE's own ID and for 1111.
module tb_pe_id_decode;
  logic [3:0] id;
  logic dp1, dp2, dp8, dp10;
  int checks = 0, failures = 0;

  pe_id_decode #(.MY_ID(4'd1))  u1  (.instr_pe_id(id), .do_process(dp1));
  pe_id_decode #(.MY_ID(4'd2))  u2  (.instr_pe_id(id), .do_process(dp2));
  pe_id_decode #(.MY_ID(4'd8))  u8  (.instr_pe_id(id), .do_process(dp8));
  pe_id_decode #(.MY_ID(4'd10)) u10 (.instr_pe_id(id), .do_process(dp10));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      id = 4'(i); #1;
      checks += 4;
      if (dp1  !== (i == 1  || i == 15)) begin failures++; $display("FAIL id %0d pe1", i); end
      if (dp2  !== (i == 2  || i == 15)) begin failures++; $display("FAIL id %0d pe2", i); end
      if (dp8  !== (i == 8  || i == 15)) begin failures++; $display("FAIL id %0d pe8", i); end
      if (dp10 !== (i == 10 || i == 15)) begin failures++; $display("FAIL id %0d pe10", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
