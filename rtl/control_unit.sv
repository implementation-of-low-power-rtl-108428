// control_unit: generates the processor's control signals.
//
// The processor alternates two one-clock cycles per instruction:
//   fetch cycle   (fetch = 1): the PC addresses memory, the instruction is read
//                 onto the bus (rd), loaded into the IR (ld_ir) and the PC is
//                 incremented (inc_pc). In the same cycle the accumulator takes
//                 Acc1, the result of the instruction executed just before
//                 (ld_acc, decided from the opcode still held in the IR).
//   execute cycle (fetch = 0): IrOut addresses memory; an operand is read (rd)
//                 or, for STA, the accumulator is written (wr); the FCU result is
//                 captured in Acc1 (exec_en, the execute clock); a JMP loads the
//                 PC (ld_pc); HLT stops the machine.
// So the accumulator write-back of one instruction overlaps the fetch of the
// next: the two-stage overlap of fetch and execute, one instruction every two
// clocks, with no stall because an instruction reads the accumulator only in its
// execute cycle, after the write-back. rd and wr are never high together.
// The six control signals (load accumulator, load IR, increment PC, load PC,
// read, write) are the design's; the exact cycle schedule is this
// implementation's. Active-low asynchronous reset starts with a fetch from the
// address the PC resets to. After HLT no signal is asserted until reset.
module control_unit
  import risc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  opcode_e opcode,   // opcode held in the instruction register
  output logic    fetch,    // 1: fetch cycle, address from PC; 0: execute cycle
  output logic    exec_en,  // execute clock enable: FCU result into Acc1
  output logic    ld_ir,
  output logic    inc_pc,
  output logic    ld_pc,
  output logic    ld_acc,
  output logic    rd,
  output logic    wr,
  output logic    halted
);
  typedef enum logic [1:0] {S_FETCH, S_EXEC, S_HALT} state_e;
  state_e state, state_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_FETCH;
    else        state <= state_n;
  end

  always_comb begin
    fetch   = 1'b0;
    exec_en = 1'b0;
    ld_ir   = 1'b0;
    inc_pc  = 1'b0;
    ld_pc   = 1'b0;
    ld_acc  = 1'b0;
    rd      = 1'b0;
    wr      = 1'b0;
    state_n = state;
    unique case (state)
      S_FETCH: begin
        fetch   = 1'b1;
        rd      = 1'b1;
        ld_ir   = 1'b1;
        inc_pc  = 1'b1;
        ld_acc  = writes_acc(opcode);
        state_n = S_EXEC;
      end
      S_EXEC: begin
        exec_en = 1'b1;
        rd      = reads_operand(opcode);
        wr      = (opcode == OP_STA);
        ld_pc   = (opcode == OP_JMP);
        state_n = (opcode == OP_HLT) ? S_HALT : S_FETCH;
      end
      default: ;  // S_HALT: hold everything
    endcase
  end

  assign halted = (state == S_HALT);

  // never drive the bus from both sides
  a_rd_wr_exclusive: assert property (@(posedge clk) !(rd && wr))
    else $error("control_unit: rd and wr together");
endmodule
