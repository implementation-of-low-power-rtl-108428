// accumulator: the processor's 32-bit accumulator register.
//
// When ld_acc is high the FCU's Acc1 output is loaded on the rising clock edge;
// otherwise the value is held. An active-low asynchronous reset clears it, as the
// design specifies ("If Reset = 0, the output of accumulator is cleared"). The
// design loads it on the falling edge of its execute clock; here all registers
// share one rising-edge clock and the control unit times the load instead.
module accumulator
  import risc_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld_acc,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (ld_acc) q <= d;
  end
endmodule
