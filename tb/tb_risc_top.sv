// tb_risc_top: end-to-end test of the processor at its full default size
// (32-bit data, 28-bit addresses, 256-word memory).
//
// The testbench writes a program and its data into the memory array, releases
// reset and waits for halted. An instruction-level reference interpreter in the
// testbench runs the same program on its own copy of the memory; afterwards the
// accumulator, all 256 memory words and the number of clocks (two per executed
// instruction, HLT included) must match. One directed program evaluates
// ((x + y) * z - w), its logic variants and a jump; then random programs use
// every opcode, with forward jumps and stores into the data area.
// Mechanisms counted, each of which must occur: accumulator write-back
// overlapping the next fetch, operand reads, memory writes through the bus
// buffer, jumps that load the PC, multiplications and halts.
module tb_risc_top;
  import risc_pkg::*;

  localparam int DEPTH    = MEM_DEPTH;
  localparam int CODE_LEN = 100;  // random program length
  localparam int DATA_LO  = 128;  // random operands live in [DATA_LO, DEPTH)

  logic              clk = 0, rst_n;
  logic              halted, fetch, mem_rd, mem_wr;
  logic [DATA_W-1:0] acc_out, data_bus;
  logic [ADDR_W-1:0] pc_out, mem_addr;
  opcode_e           opcode_out;

  risc_top dut (.clk, .rst_n, .halted, .fetch, .acc_out, .pc_out, .opcode_out,
                .mem_addr, .data_bus, .mem_rd, .mem_wr);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_overlap = 0, n_read = 0, n_write = 0, n_jump = 0, n_mul = 0, n_halt = 0;

  logic [DATA_W-1:0] prog [DEPTH];   // image loaded into the DUT
  logic [DATA_W-1:0] ref_mem [DEPTH];
  logic [DATA_W-1:0] ref_acc;
  int                ref_steps;

  // mechanism counters, sampled on every active clock edge
  always @(posedge clk) if (rst_n && !halted) begin
    if (fetch && dut.ld_acc)                    n_overlap++;
    if (!fetch && mem_rd)                       n_read++;
    if (mem_wr)                                 n_write++;
    if (dut.ld_pc)                              n_jump++;
    if (!fetch && opcode_out == OP_MUL)         n_mul++;
    if (!fetch && opcode_out == OP_HLT)         n_halt++;
  end

  // instruction-level reference model
  task automatic interpret();
    logic [ADDR_W-1:0] pc;
    logic [DATA_W-1:0] ins, d;
    logic [7:0]        a;
    opcode_e           op;
    pc = 0; ref_acc = 0; ref_steps = 0;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = prog[i];
    forever begin
      ins = ref_mem[pc[7:0]];
      pc  = pc + 1;
      ref_steps++;
      op  = opcode_e'(ins[31:28]);
      a   = ins[7:0];
      d   = ref_mem[a];
      case (op)
        OP_LDA:  ref_acc = d;
        OP_STA:  ref_mem[a] = ref_acc;
        OP_ADD:  ref_acc = ref_acc + d;
        OP_SUB:  ref_acc = ref_acc - d;
        OP_MUL:  ref_acc = ref_acc * d;
        OP_AND:  ref_acc = ref_acc & d;
        OP_OR:   ref_acc = ref_acc | d;
        OP_NAND: ref_acc = ~(ref_acc & d);
        OP_XOR:  ref_acc = ref_acc ^ d;
        OP_NOT:  ref_acc = ~ref_acc;
        OP_SHL:  ref_acc = ref_acc << 1;
        OP_SHR:  ref_acc = ref_acc >> 1;
        OP_JMP:  pc = ins[ADDR_W-1:0];
        default: ;
      endcase
      if (op == OP_HLT || ref_steps > 10000) break;
    end
  endtask

  task automatic run_and_compare(string name);
    int cycles;
    interpret();
    for (int i = 0; i < DEPTH; i++) dut.u_mem.mem[i] = prog[i];
    rst_n = 0;
    @(negedge clk); rst_n = 1;
    cycles = 0;
    while (!halted && cycles < 30000) begin
      @(posedge clk); #1;
      cycles++;
    end
    checks++;
    if (acc_out !== ref_acc) begin
      failures++; $display("FAIL %s: acc=%h expected %h", name, acc_out, ref_acc);
    end
    checks++;
    if (cycles != 2 * ref_steps) begin
      failures++; $display("FAIL %s: %0d clocks, expected %0d (2 per instruction)", name, cycles, 2 * ref_steps);
    end
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (dut.u_mem.mem[i] !== ref_mem[i]) begin
        failures++; $display("FAIL %s: mem[%0d]=%h expected %h", name, i, dut.u_mem.mem[i], ref_mem[i]);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1;
    #1 rst_n = 0;

    // directed program: r = ((x + y) * z - w); then logic on r, a jump, stores
    for (int i = 0; i < DEPTH; i++) prog[i] = instr(OP_HLT, 0);
    prog[200] = 32'd1234;        // x
    prog[201] = 32'd4321;        // y
    prog[202] = 32'd77;          // z
    prog[203] = 32'd1000;        // w
    prog[204] = 32'h0F0F_0F0F;   // mask
    prog[0]  = instr(OP_LDA, 200);
    prog[1]  = instr(OP_ADD, 201);
    prog[2]  = instr(OP_MUL, 202);
    prog[3]  = instr(OP_SUB, 203);
    prog[4]  = instr(OP_STA, 210);
    prog[5]  = instr(OP_JMP, 9);
    prog[6]  = instr(OP_LDA, 203);  // skipped
    prog[7]  = instr(OP_STA, 211);  // skipped
    prog[8]  = instr(OP_HLT, 0);    // skipped
    prog[9]  = instr(OP_AND, 204);
    prog[10] = instr(OP_OR,  201);
    prog[11] = instr(OP_XOR, 200);
    prog[12] = instr(OP_NAND, 204);
    prog[13] = instr(OP_NOT, 0);
    prog[14] = instr(OP_SHL, 0);
    prog[15] = instr(OP_SHR, 0);
    prog[16] = instr(OP_STA, 212);
    prog[17] = instr(OP_NOP, 0);
    prog[18] = instr(OP_HLT, 0);
    run_and_compare("directed");
    checks++;
    if (ref_mem[210] !== 32'(((1234 + 4321) * 77) - 1000)) begin
      failures++; $display("FAIL directed: reference arithmetic");
    end

    // random programs
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < DEPTH; i++) prog[i] = (i < DATA_LO) ? instr(OP_HLT, 0) : $urandom;
      for (int pc = 0; pc < CODE_LEN; pc++) begin
        opcode_e op;
        int      tgt;
        op = opcode_e'($urandom % 16);
        if (op == OP_HLT) op = OP_MUL;
        if (op == OP_JMP) begin
          tgt = pc + 1 + int'($urandom % 4);   // forward only, so it terminates
          prog[pc] = instr(op, ADDR_W'(tgt));
        end else begin
          prog[pc] = instr(op, ADDR_W'(DATA_LO + int'($urandom % (DEPTH - DATA_LO))));
        end
      end
      run_and_compare($sformatf("random%0d", t));
    end

    checks++; if (n_overlap == 0) begin failures++; $display("FAIL no write-back overlap"); end
    checks++; if (n_read    == 0) begin failures++; $display("FAIL no operand read"); end
    checks++; if (n_write   == 0) begin failures++; $display("FAIL no memory write"); end
    checks++; if (n_jump    == 0) begin failures++; $display("FAIL no jump"); end
    checks++; if (n_mul     == 0) begin failures++; $display("FAIL no multiply"); end
    checks++; if (n_halt    != 21) begin failures++; $display("FAIL halts %0d", n_halt); end
    $display("mechanisms: overlap=%0d reads=%0d writes=%0d jumps=%0d mul=%0d halts=%0d",
             n_overlap, n_read, n_write, n_jump, n_mul, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
