// tb_reversible_multiplier: checks the 32x32 BVPPG / Peres-adder multiplier's
// low 32 product bits against the built-in multiplication, on corner cases and
// 1000 random operand pairs (including small operands whose product fits).
module tb_reversible_multiplier;
  localparam int W = 32;
  logic [W-1:0] a, b, p;
  int checks = 0, failures = 0;

  reversible_multiplier #(.W(W)) dut (.a, .b, .p);

  task automatic check();
    logic [W-1:0] exp;
    #1;
    exp = a * b;
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", a, b, p, exp);
    end
  endtask

  initial begin
    a = '1; b = '1; check();
    a = 0;  b = 32'h1234_5678; check();
    a = 1;  b = 32'hdead_beef; check();
    a = 32'h0001_0000; b = 32'h0001_0000; check();
    a = 12345; b = 6789; check();
    for (int i = 0; i < 1000; i++) begin
      a = $urandom; b = $urandom;
      if (i % 2 == 0) begin a = a & 32'hFFFF; b = b & 32'hFFFF; end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
