// tb_accumulator: checks load-on-enable, hold, and the active-low asynchronous
// clear of the accumulator against a reference register.
module tb_accumulator;
  logic        clk = 0, rst_n, ld_acc;
  logic [31:0] d, q, ref_q;
  int checks = 0, failures = 0;

  accumulator dut (.clk, .rst_n, .ld_acc, .d, .q);

  always #5 clk = ~clk;

  initial begin
    rst_n = 1; #1 rst_n = 0; ld_acc = 0; d = '1;
    #1;
    checks++; if (q !== 0) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1; ref_q = 0;
    for (int i = 0; i < 300; i++) begin
      d = $urandom; ld_acc = 1'($urandom);
      @(posedge clk); #1;
      if (ld_acc) ref_q = d;
      checks++; if (q !== ref_q) begin failures++; $display("FAIL i=%0d q=%h exp=%h", i, q, ref_q); end
      if (i == 150) begin        // asynchronous clear between clock edges
        #2 rst_n = 0; #1;
        checks++; if (q !== 0) begin failures++; $display("FAIL async clear"); end
        rst_n = 1; ref_q = 0;
      end
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
