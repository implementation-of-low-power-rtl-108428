// tb_memory: writes every one of the 256 words, reads them back, then runs
// random reads and writes against a reference array. Also checks that the read
// port gives 0 when rd is low and that addresses alias modulo 256.
module tb_memory;
  logic        clk = 0, rd, wr;
  logic [27:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [256];
  int checks = 0, failures = 0;

  memory dut (.clk, .addr, .rd, .wr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    rd = 0; wr = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      addr = 28'(i); wdata = $urandom; wr = 1;
      ref_mem[i] = wdata;
      @(negedge clk);
    end
    wr = 0;
    for (int i = 0; i < 256; i++) begin
      addr = 28'(i); rd = 1; #1;
      checks++; if (rdata !== ref_mem[i]) begin failures++; $display("FAIL read %0d", i); end
    end
    rd = 0; #1;
    checks++; if (rdata !== 0) begin failures++; $display("FAIL rd low"); end
    addr = 28'h100 + 28'd7; rd = 1; #1;
    checks++; if (rdata !== ref_mem[7]) begin failures++; $display("FAIL alias"); end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      addr = 28'($urandom % 256); wr = 1'($urandom); rd = ~wr; wdata = $urandom;
      #1;
      if (rd) begin
        checks++; if (rdata !== ref_mem[addr[7:0]]) begin failures++; $display("FAIL rand read"); end
      end
      @(posedge clk);
      if (wr) ref_mem[addr[7:0]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
