// tb_peres_rca: checks the 32-bit Peres-gate ripple carry adder against the
// built-in addition: corner cases (full carry ripple, all ones) and 2000 random
// operand pairs with random carry in.
module tb_peres_rca;
  localparam int W = 32;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  peres_rca #(.W(W)) dut (.a, .b, .cin, .sum, .cout);

  task automatic check();
    logic [W:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %0d = %h, expected %h", a, b, cin, {cout, sum}, exp);
    end
  endtask

  initial begin
    a = '1; b = '0; cin = 1'b1; check();      // carry ripples through every bit
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    a = 32'h8000_0000; b = 32'h8000_0000; cin = 1'b0; check();
    for (int i = 0; i < 2000; i++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
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
