// risc_top: 32-bit accumulator RISC processor built around a flexible
// computational unit (FCU) whose arithmetic uses reversible logic gates.
//
// Datapath: the program counter and the instruction register's operand address
// go through addr_mux to the single address port of the unified memory. The bus
// buffer puts the memory word on the data bus in a read, or the accumulator
// towards memory in a write. The bus feeds the instruction register (opcode and
// 28-bit address) and the FCU, whose other input is the accumulator. The FCU's
// registered result Acc1 is loaded into the accumulator. The control unit runs a
// fetch cycle and an execute cycle per instruction, with the accumulator
// write-back of one instruction overlapping the fetch of the next.
//
// Interface: clk, rst_n (active-low asynchronous reset; execution starts at
// address 0). The memory is loaded by the environment (the testbench writes the
// memory array). Status outputs show the accumulator, PC, opcode, the bus and the
// memory strobes, and halted rises after an HLT instruction.
module risc_top
  import risc_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              halted,
  output logic              fetch,
  output logic [DATA_W-1:0] acc_out,
  output logic [ADDR_W-1:0] pc_out,
  output opcode_e           opcode_out,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] data_bus,
  output logic              mem_rd,
  output logic              mem_wr
);
  logic              exec_en, ld_ir, inc_pc, ld_pc, ld_acc, rd, wr, mem_we;
  opcode_e           opcode;
  logic [ADDR_W-1:0] pc, irout, addr;
  logic [DATA_W-1:0] bus, mem_rdata, mem_wdata, acc, acc1;

  control_unit u_cu (
    .clk, .rst_n, .opcode, .fetch, .exec_en, .ld_ir, .inc_pc, .ld_pc,
    .ld_acc, .rd, .wr, .halted
  );

  program_counter u_pc (
    .clk, .rst_n, .inc_pc, .ld_pc, .ld_addr(irout), .pc
  );

  addr_mux u_amux (.fetch, .pc, .irout, .addr);

  memory #(.DEPTH(DEPTH)) u_mem (
    .clk, .addr, .rd, .wr(mem_we), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  bus_buffer u_buf (
    .rd, .wr, .mem_rdata, .acc, .bus, .mem_wdata, .mem_we
  );

  instruction_register u_ir (
    .clk, .rst_n, .ld_ir, .d(bus), .opcode, .irout
  );

  fcu u_fcu (
    .clk, .rst_n, .exec_en, .opcode, .data(bus), .acc, .result(), .acc1
  );

  accumulator u_acc (.clk, .rst_n, .ld_acc, .d(acc1), .q(acc));

  assign acc_out    = acc;
  assign pc_out     = pc;
  assign opcode_out = opcode;
  assign mem_addr   = addr;
  assign data_bus   = bus;
  assign mem_rd     = rd;
  assign mem_wr     = mem_we;
endmodule
