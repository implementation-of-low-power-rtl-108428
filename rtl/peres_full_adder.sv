// peres_full_adder: one-bit reversible full adder made of two Peres gates.
//
// The first gate takes (A, B, 0) and gives A xor B and A and B. The second takes
// (A xor B, Cin, A and B) and gives the sum A xor B xor Cin on Q and the carry
// (A xor B) Cin xor A B on R. Combinational; the cell of peres_rca.
module peres_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic g1_p, g1_q, g1_r, g2_p;

  peres_gate u_pg1 (.a(a),    .b(b),   .c(1'b0), .p(g1_p), .q(g1_q), .r(g1_r));
  peres_gate u_pg2 (.a(g1_q), .b(cin), .c(g1_r), .p(g2_p), .q(sum),  .r(cout));
endmodule
