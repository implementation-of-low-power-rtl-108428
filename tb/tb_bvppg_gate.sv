// tb_bvppg_gate: exhaustive check of the BVPPG gate over all 32 input patterns,
// that it is one-to-one, and that with C = E = 0 it gives the two partial
// products A*B and D*B.
module tb_bvppg_gate;
  logic a, b, c, d, e, p, q, r, s, t;
  logic [31:0] seen;
  int checks = 0, failures = 0;

  bvppg_gate dut (.a, .b, .c, .d, .e, .p, .q, .r, .s, .t);

  initial begin
    seen = '0;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = 5'(v);
      #1;
      checks++; if ({p, q, s} !== {a, b, d})  begin failures++; $display("FAIL fanout v=%0d", v); end
      checks++; if (r !== ((a & b) ^ c))      begin failures++; $display("FAIL r v=%0d", v); end
      checks++; if (t !== ((b & d) ^ e))      begin failures++; $display("FAIL t v=%0d", v); end
      if (!c && !e) begin
        checks++; if ({r, t} !== {a & b, d & b}) begin failures++; $display("FAIL products v=%0d", v); end
      end
      seen[{p, q, r, s, t}] = 1'b1;
    end
    checks++; if (seen !== 32'hFFFF_FFFF) begin failures++; $display("FAIL not one-to-one"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
