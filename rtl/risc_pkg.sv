// risc_pkg: shared widths and the instruction set of the 32-bit accumulator RISC
// processor.
//
// An instruction is one 32-bit word: bits [31:28] hold the opcode and bits
// [27:0] the address of the memory word the instruction works on. Data words are
// 32-bit unsigned integers and addresses are 28 bits wide, as the design
// specifies; the 4-bit opcode and the count of fifteen instructions are also the
// design's. Which fifteen operations are encoded, and with which codes, is this
// implementation's own choice, built from the operations the processor is said to
// perform (load, store, add, subtract, multiply, logic, shift, jump).
package risc_pkg;

  localparam int unsigned DATA_W    = 32;  // data and instruction word width
  localparam int unsigned ADDR_W    = 28;  // operand / program address width
  localparam int unsigned OPC_W     = 4;   // opcode width
  localparam int unsigned MEM_DEPTH = 256; // words in the unified memory

  typedef enum logic [OPC_W-1:0] {
    OP_NOP  = 4'h0,  // no operation
    OP_LDA  = 4'h1,  // ACC <- M[addr]
    OP_STA  = 4'h2,  // M[addr] <- ACC
    OP_ADD  = 4'h3,  // ACC <- ACC + M[addr]
    OP_SUB  = 4'h4,  // ACC <- ACC - M[addr]
    OP_MUL  = 4'h5,  // ACC <- low word of ACC * M[addr]
    OP_AND  = 4'h6,  // ACC <- ACC & M[addr]
    OP_OR   = 4'h7,  // ACC <- ACC | M[addr]
    OP_NAND = 4'h8,  // ACC <- ~(ACC & M[addr])
    OP_XOR  = 4'h9,  // ACC <- ACC ^ M[addr]
    OP_NOT  = 4'hA,  // ACC <- ~ACC
    OP_SHL  = 4'hB,  // ACC <- ACC << 1
    OP_SHR  = 4'hC,  // ACC <- ACC >> 1 (logical)
    OP_JMP  = 4'hD,  // PC  <- addr (unconditional)
    OP_HLT  = 4'hE,  // stop fetching
    OP_RSV  = 4'hF   // reserved, executes as NOP
  } opcode_e;

  // Instructions whose result the FCU writes back into the accumulator.
  function automatic logic writes_acc(opcode_e op);
    case (op)
      OP_LDA, OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_NAND, OP_XOR,
      OP_NOT, OP_SHL, OP_SHR: return 1'b1;
      default:                return 1'b0;
    endcase
  endfunction

  // Instructions that read a memory operand during their execute cycle.
  function automatic logic reads_operand(opcode_e op);
    case (op)
      OP_LDA, OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_NAND, OP_XOR:
              return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // Build an instruction word.
  function automatic logic [DATA_W-1:0] instr(opcode_e op, logic [ADDR_W-1:0] addr);
    return {op, addr};
  endfunction

endpackage
