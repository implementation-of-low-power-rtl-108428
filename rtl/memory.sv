// memory: unified instruction and data memory, MEM_DEPTH words of DATA_W bits.
//
// One address port shared by instruction fetch and operand access. A read (rd)
// returns the addressed word combinationally on rdata (0 when rd is low); a
// write (wr) stores wdata on the rising clock edge. Only the low log2(MEM_DEPTH)
// bits of the 28-bit address select a word, so higher addresses alias. The
// 256-word, 32-bit organisation is the design's; the asynchronous read and the
// aliasing are this implementation's. Contents are not reset.
module memory
  import risc_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH,
  parameter int unsigned W     = DATA_W,
  parameter int unsigned AW    = ADDR_W
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          rd,
  input  logic          wr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [IW-1:0] idx;

  assign idx   = addr[IW-1:0];
  assign rdata = rd ? mem[idx] : '0;

  always_ff @(posedge clk) begin
    if (wr) mem[idx] <= wdata;
  end
endmodule
