// tb_peres_gate: exhaustive truth-table check of the Peres gate, and a check that
// its eight output patterns are all different (one-to-one mapping).
module tb_peres_gate;
  logic a, b, c, p, q, r;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++; if (p !== a)             begin failures++; $display("FAIL p v=%0d", v); end
      checks++; if (q !== (a ^ b))       begin failures++; $display("FAIL q v=%0d", v); end
      checks++; if (r !== ((a & b) ^ c)) begin failures++; $display("FAIL r v=%0d", v); end
      seen[{p, q, r}] = 1'b1;
    end
    checks++; if (seen !== 8'hFF) begin failures++; $display("FAIL not one-to-one"); end
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
