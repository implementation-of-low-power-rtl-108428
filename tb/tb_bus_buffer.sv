// tb_bus_buffer: checks the bus direction for read, write and idle: memory data
// onto the bus in a read, accumulator towards memory (with write strobe) in a
// write, and a quiet bus otherwise.
module tb_bus_buffer;
  logic        rd, wr, mem_we;
  logic [31:0] mem_rdata, acc, bus, mem_wdata;
  int checks = 0, failures = 0;

  bus_buffer dut (.rd, .wr, .mem_rdata, .acc, .bus, .mem_wdata, .mem_we);

  initial begin
    for (int i = 0; i < 300; i++) begin
      mem_rdata = $urandom; acc = $urandom;
      case (i % 3)
        0: begin rd = 1; wr = 0; end
        1: begin rd = 0; wr = 1; end
        default: begin rd = 0; wr = 0; end
      endcase
      #1;
      checks++;
      case (i % 3)
        0: if (bus !== mem_rdata || mem_we !== 0) begin failures++; $display("FAIL read"); end
        1: if (bus !== acc || mem_wdata !== acc || mem_we !== 1) begin failures++; $display("FAIL write"); end
        default: if (bus !== 0 || mem_we !== 0) begin failures++; $display("FAIL idle"); end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
