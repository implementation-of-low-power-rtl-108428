// tb_toffoli_gate: exhaustive truth-table check of the Toffoli gate and of its
// reversibility (the gate is its own inverse).
module tb_toffoli_gate;
  logic a, b, c, p, q, r, p2, q2, r2;
  int checks = 0, failures = 0;

  toffoli_gate dut  (.a(a), .b(b), .c(c), .p(p),  .q(q),  .r(r));
  toffoli_gate dut2 (.a(p), .b(q), .c(r), .p(p2), .q(q2), .r(r2));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++; if ({p, q} !== {a, b})    begin failures++; $display("FAIL pq v=%0d", v); end
      checks++; if (r !== ((a & b) ^ c))  begin failures++; $display("FAIL r v=%0d", v); end
      checks++; if ({p2, q2, r2} !== {a, b, c}) begin failures++; $display("FAIL inverse v=%0d", v); end
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
