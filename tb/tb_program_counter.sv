// tb_program_counter: checks reset to 0, increment by one, jump load (taking
// priority over increment), hold, and wrap at the 28-bit limit.
module tb_program_counter;
  logic        clk = 0, rst_n, inc_pc, ld_pc;
  logic [27:0] ld_addr, pc, ref_pc;
  int checks = 0, failures = 0;

  program_counter dut (.clk, .rst_n, .inc_pc, .ld_pc, .ld_addr, .pc);

  always #5 clk = ~clk;

  initial begin
    rst_n = 1; #1 rst_n = 0; inc_pc = 0; ld_pc = 0; ld_addr = 0;
    #1;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1; ref_pc = 0;
    for (int i = 0; i < 400; i++) begin
      inc_pc = 1'($urandom); ld_pc = ($urandom % 8 == 0);
      ld_addr = 28'($urandom);
      if (i == 200) begin ld_pc = 1; inc_pc = 0; ld_addr = 28'hFFF_FFFF; end
      if (i == 201) begin ld_pc = 0; inc_pc = 1; end
      @(posedge clk); #1;
      if (ld_pc) ref_pc = ld_addr; else if (inc_pc) ref_pc = ref_pc + 1;
      checks++; if (pc !== ref_pc) begin failures++; $display("FAIL i=%0d pc=%h exp=%h", i, pc, ref_pc); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
