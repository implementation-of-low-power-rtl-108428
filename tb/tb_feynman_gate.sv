// tb_feynman_gate: exhaustive check of the Feynman (CNOT) gate against its truth
// table, including that the mapping is reversible (applying it twice restores
// the inputs).
module tb_feynman_gate;
  logic a, b, p, q, p2, q2;
  int checks = 0, failures = 0;

  feynman_gate dut  (.a(a), .b(b), .p(p),  .q(q));
  feynman_gate dut2 (.a(p), .b(q), .p(p2), .q(q2));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++; if (p !== a)       begin failures++; $display("FAIL p v=%0d", v); end
      checks++; if (q !== (a ^ b)) begin failures++; $display("FAIL q v=%0d", v); end
      checks++; if ({p2, q2} !== {a, b}) begin failures++; $display("FAIL inverse v=%0d", v); end
    end
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
