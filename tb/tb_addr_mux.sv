// tb_addr_mux: checks that the PC is selected while fetch is high and IrOut
// while it is low, on random addresses.
module tb_addr_mux;
  logic        fetch;
  logic [27:0] pc, irout, addr;
  int checks = 0, failures = 0;

  addr_mux dut (.fetch, .pc, .irout, .addr);

  initial begin
    for (int i = 0; i < 200; i++) begin
      fetch = 1'(i); pc = 28'($urandom); irout = 28'($urandom);
      #1;
      checks++;
      if (addr !== (fetch ? pc : irout)) begin failures++; $display("FAIL fetch=%0d", fetch); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
