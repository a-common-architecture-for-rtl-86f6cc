// tb_mem_bank: acquisition from the own port and both neighbour ports (with
// PE_ID matching and the neighbour offsets), write priority, the result write
// port outside acquisition, and the two read ports, against an array model.
module tb_mem_bank;
  import modsimd_pkg::*;
  logic clk = 0, acq_en = 0, we = 0;
  bus_word_t adc_own = '0, adc_up = '0, adc_dn = '0;
  addr_t rd_addr_a = 0, rd_addr_b = 0, waddr = 0;
  data_t rd_data_a, rd_data_b, wdata = 0;
  data_t model [64];
  int checks = 0, failures = 0;

  mem_bank #(.MY_ID(4'd5), .UP_ID(4'd4), .DN_ID(4'd6)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bus_word_t rand_word(pe_id_t likely);
    bus_word_t w;
    w = 27'($urandom);
    case ($urandom % 4)
      0, 1: w.pe_id = likely;
      2: w.pe_id = 4'hF;
      default: ;
    endcase
    return w;
  endfunction

  task automatic check_all();
    for (int i = 0; i < 64; i++) begin
      rd_addr_a = 6'(i); rd_addr_b = 6'(63 - i); #1;
      checks += 2;
      if (rd_data_a !== model[i]) begin failures++; $display("FAIL A[%0d] %h %h", i, rd_data_a, model[i]); end
      if (rd_data_b !== model[63 - i]) begin failures++; $display("FAIL B[%0d]", 63 - i); end
    end
  endtask

  initial begin
    // Fill through the own port with the common ID.
    acq_en = 1;
    for (int i = 0; i < 64; i++) begin
      adc_own = '{valid: 1'b1, pe_id: 4'hF, addr: 6'(i), data: 16'(i * 3 + 7)};
      model[i] = 16'(i * 3 + 7);
      @(posedge clk); #1;
    end
    adc_own = '0;
    check_all();
    // Random acquisition traffic on all three ports.
    for (int it = 0; it < 3000; it++) begin
      adc_own = rand_word(4'd5); adc_up = rand_word(4'd4); adc_dn = rand_word(4'd6);
      if (adc_dn.valid && (adc_dn.pe_id == 6 || adc_dn.pe_id == 15)) model[6'(adc_dn.addr + 22)] = adc_dn.data;
      if (adc_up.valid && (adc_up.pe_id == 4 || adc_up.pe_id == 15)) model[6'(adc_up.addr - 10)] = adc_up.data;
      if (adc_own.valid && (adc_own.pe_id == 5 || adc_own.pe_id == 15)) model[adc_own.addr] = adc_own.data;
      we = 1; waddr = 6'($urandom); wdata = 16'($urandom);   // ignored during acquisition
      @(posedge clk); #1;
    end
    adc_own = '0; adc_up = '0; adc_dn = '0;
    check_all();
    // Write port after acquisition; ADC words are ignored now.
    acq_en = 0;
    for (int it = 0; it < 500; it++) begin
      we = 1'($urandom); waddr = 6'($urandom); wdata = 16'($urandom);
      adc_own = '{valid: 1'b1, pe_id: 4'd5, addr: 6'($urandom), data: 16'($urandom)};
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
