// peres_rca: W-bit ripple carry adder built from Peres-gate full adders.
//
// sum = a + b + cin, with the carry out of the top bit on cout. Bit i's carry
// ripples into bit i+1, so the delay grows linearly with W. This reversible-gate
// ripple carry adder is the arithmetic core the design proposes in place of a
// carry-save adder. Purely combinational.
module peres_rca #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    peres_full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
