// addr_mux: selects the memory address from the program counter or the
// instruction register.
//
// Instructions and data share one memory with one address port. While fetch is
// high the PC addresses the memory (instruction fetch); while it is low the
// instruction register's operand address IrOut does. Combinational.
module addr_mux
  import risc_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          fetch,
  input  logic [AW-1:0] pc,
  input  logic [AW-1:0] irout,
  output logic [AW-1:0] addr
);
  assign addr = fetch ? pc : irout;
endmodule
