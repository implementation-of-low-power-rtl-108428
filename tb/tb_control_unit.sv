// tb_control_unit: drives random opcodes and checks, cycle by cycle, the control
// signals of the fetch and execute cycles against an independent reference
// schedule: fetch/execute alternation (two clocks per instruction), operand
// read only for memory-operand instructions, write only for STA, PC load only
// for JMP, accumulator load in the fetch cycle after a result-producing
// instruction, and the halt after HLT.
module tb_control_unit;
  import risc_pkg::*;
  logic    clk = 0, rst_n;
  opcode_e opcode;
  logic    fetch, exec_en, ld_ir, inc_pc, ld_pc, ld_acc, rd, wr, halted;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .rst_n, .opcode, .fetch, .exec_en, .ld_ir, .inc_pc,
                    .ld_pc, .ld_acc, .rd, .wr, .halted);

  always #5 clk = ~clk;

  function automatic logic [8:0] expect_sig(bit is_fetch, bit is_halt, opcode_e op);
    // {fetch, exec_en, ld_ir, inc_pc, ld_pc, ld_acc, rd, wr, halted}
    bit alu, mem_in;
    alu    = op inside {OP_LDA, OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_NAND,
                        OP_XOR, OP_NOT, OP_SHL, OP_SHR};
    mem_in = op inside {OP_LDA, OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_NAND, OP_XOR};
    if (is_halt)  return 9'b0_0000_0001;
    if (is_fetch) return {1'b1, 1'b0, 1'b1, 1'b1, 1'b0, alu, 1'b1, 1'b0, 1'b0};
    return {1'b0, 1'b1, 1'b0, 1'b0, op == OP_JMP, 1'b0, mem_in, op == OP_STA, 1'b0};
  endfunction

  initial begin
    bit ph_fetch, ph_halt;
    int n_instr;
    rst_n = 1; #1 rst_n = 0; opcode = OP_NOP;
    #1;
    @(negedge clk); rst_n = 1;
    ph_fetch = 1; ph_halt = 0; n_instr = 0;
    for (int cyc = 0; cyc < 600; cyc++) begin
      // the opcode only changes after a fetch; avoid HLT until near the end
      if (ph_fetch && cyc > 0) begin
        opcode = opcode_e'($urandom % 16);
        if (opcode == OP_HLT && cyc < 560) opcode = OP_ADD;
        if (cyc == 580) opcode = OP_HLT;
      end
      #1;
      checks++;
      if ({fetch, exec_en, ld_ir, inc_pc, ld_pc, ld_acc, rd, wr, halted}
          !== expect_sig(ph_fetch, ph_halt, opcode)) begin
        failures++;
        $display("FAIL cyc=%0d op=%s got=%b exp=%b", cyc, opcode.name(),
                 {fetch, exec_en, ld_ir, inc_pc, ld_pc, ld_acc, rd, wr, halted},
                 expect_sig(ph_fetch, ph_halt, opcode));
      end
      @(posedge clk);
      if (!ph_halt) begin
        if (ph_fetch) n_instr++;
        if (!ph_fetch && opcode == OP_HLT) ph_halt = 1;
        ph_fetch = !ph_fetch;
      end
      @(negedge clk);
    end
    // rate: two clocks per instruction until the halt
    checks++;
    if (!ph_halt || n_instr < 250) begin failures++; $display("FAIL instr count %0d", n_instr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
