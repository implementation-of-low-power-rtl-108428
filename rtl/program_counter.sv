// program_counter: address of the next instruction.
//
// On a rising clock edge it loads ld_addr when ld_pc is high (a jump), else adds
// one when inc_pc is high, else holds. ld_pc wins if both are high. Active-low
// asynchronous reset to address 0, where the first instruction is fetched.
// Width ADDR_W = 28 bits as the design specifies; the reset address and the
// priority of load over increment are this implementation's choices.
module program_counter
  import risc_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc_pc,
  input  logic          ld_pc,
  input  logic [AW-1:0] ld_addr,
  output logic [AW-1:0] pc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pc <= '0;
    else if (ld_pc)  pc <= ld_addr;
    else if (inc_pc) pc <= pc + AW'(1);
  end
endmodule
