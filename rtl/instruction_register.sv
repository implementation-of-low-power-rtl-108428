// instruction_register: 32-bit instruction register.
//
// When ld_ir is high the word on the data bus is loaded on the rising clock
// edge. Its upper 4 bits [31:28] are given out as the opcode, its lower 28 bits
// [27:0] as IrOut, the operand address. An active-low asynchronous reset clears
// it regardless of anything else (the cleared opcode is NOP), as the design
// specifies.
module instruction_register
  import risc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld_ir,
  input  logic [DATA_W-1:0] d,
  output opcode_e           opcode,
  output logic [ADDR_W-1:0] irout
);
  logic [DATA_W-1:0] ir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ir <= '0;
    else if (ld_ir) ir <= d;
  end

  assign opcode = opcode_e'(ir[DATA_W-1 -: OPC_W]);
  assign irout  = ir[ADDR_W-1:0];
endmodule
