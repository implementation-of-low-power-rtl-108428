// bus_buffer: the buffer that makes the processor's data bus bidirectional.
//
// In a read (rd = 1, wr = 0) the memory drives the bus, which feeds the
// instruction register and the FCU. In a write (rd = 0, wr = 1) the accumulator
// drives the bus towards the memory, and the bus shows the accumulator. With
// neither, the bus is 0. The design uses a tri-state buffer; this implementation
// builds the same bus as a multiplexer with separate read and write wires, so
// the whole design stays two-state and synthesizable. Combinational. rd and wr
// must never be high together.
module bus_buffer
  import risc_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         rd,
  input  logic         wr,
  input  logic [W-1:0] mem_rdata,  // from memory
  input  logic [W-1:0] acc,        // from accumulator
  output logic [W-1:0] bus,        // data bus
  output logic [W-1:0] mem_wdata,  // to memory
  output logic         mem_we      // write strobe to memory
);
  always_comb begin
    mem_we    = wr & ~rd;
    mem_wdata = mem_we ? acc : '0;
    if (mem_we)  bus = acc;
    else if (rd) bus = mem_rdata;
    else         bus = '0;
  end

  always_comb begin
    assert (!(rd && wr)) else $error("bus_buffer: rd and wr high together");
  end
endmodule
