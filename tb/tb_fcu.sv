// tb_fcu: checks every FCU operation against a reference model written with the
// built-in operators, on random operands, and that Acc1 changes only on a clock
// edge with exec_en high (registered output, one cycle latency) and clears on
// reset.
module tb_fcu;
  import risc_pkg::*;
  logic        clk = 0, rst_n, exec_en;
  opcode_e     opcode;
  logic [31:0] data, acc, result, acc1;
  int checks = 0, failures = 0;

  fcu dut (.clk, .rst_n, .exec_en, .opcode, .data, .acc, .result, .acc1);

  always #5 clk = ~clk;

  function automatic logic [31:0] model(opcode_e op, logic [31:0] d, logic [31:0] a);
    case (op)
      OP_LDA:  return d;
      OP_ADD:  return a + d;
      OP_SUB:  return a - d;
      OP_MUL:  return a * d;
      OP_AND:  return a & d;
      OP_OR:   return a | d;
      OP_NAND: return ~(a & d);
      OP_XOR:  return a ^ d;
      OP_NOT:  return ~a;
      OP_SHL:  return a << 1;
      OP_SHR:  return a >> 1;
      default: return a;
    endcase
  endfunction

  initial begin
    logic [31:0] exp, prev_acc1;
    rst_n = 1; #1 rst_n = 0; exec_en = 0; opcode = OP_NOP; data = 0; acc = 0;
    #1;
    checks++; if (acc1 !== 0) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1600; i++) begin
      opcode = opcode_e'(i % 16);
      data = $urandom; acc = $urandom;
      if (i % 5 == 0) data = 32'hFFFF_FFFF;    // borrow / carry through all bits
      exec_en = 1'($urandom) | (i < 100);
      #1;
      exp = model(opcode, data, acc);
      checks++;
      if (result !== exp) begin
        failures++; $display("FAIL op=%s d=%h a=%h res=%h exp=%h", opcode.name(), data, acc, result, exp);
      end
      prev_acc1 = acc1;
      @(posedge clk); #1;
      checks++;
      if (acc1 !== (exec_en ? exp : prev_acc1)) begin
        failures++; $display("FAIL acc1 op=%s en=%0d got=%h", opcode.name(), exec_en, acc1);
      end
      @(negedge clk);
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
