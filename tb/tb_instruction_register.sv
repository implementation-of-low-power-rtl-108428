// tb_instruction_register: checks that a loaded word splits into opcode [31:28]
// and address [27:0], that the register holds without ld_ir, and that the
// asynchronous reset clears it between clock edges.
module tb_instruction_register;
  import risc_pkg::*;
  logic        clk = 0, rst_n, ld_ir;
  logic [31:0] d, ref_ir;
  opcode_e     opcode;
  logic [27:0] irout;
  int checks = 0, failures = 0;

  instruction_register dut (.clk, .rst_n, .ld_ir, .d, .opcode, .irout);

  always #5 clk = ~clk;

  initial begin
    rst_n = 1; #1 rst_n = 0; ld_ir = 0; d = 0;
    #1;
    checks++; if ({opcode, irout} !== 32'h0) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1; ref_ir = 0;
    for (int i = 0; i < 300; i++) begin
      d = $urandom; ld_ir = 1'($urandom);
      @(posedge clk); #1;
      if (ld_ir) ref_ir = d;
      checks++; if (4'(opcode) !== ref_ir[31:28]) begin failures++; $display("FAIL opcode i=%0d", i); end
      checks++; if (irout !== ref_ir[27:0])       begin failures++; $display("FAIL irout i=%0d", i); end
      if (i == 100) begin
        #2 rst_n = 0; #1;
        checks++; if ({opcode, irout} !== 32'h0) begin failures++; $display("FAIL async clear"); end
        rst_n = 1; ref_ir = 0;
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
