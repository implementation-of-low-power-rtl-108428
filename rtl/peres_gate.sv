// peres_gate: 3x3 reversible Peres gate.
//
// Inputs (A, B, C), outputs P = A, Q = A xor B, R = (A and B) xor C; quantum
// cost 4. As the design describes, it is built from two Toffoli gates: the first
// (A, B, C) gives R = AB xor C; the second has A and a constant 1 as controls and
// B as target, so its target output is A xor B (a Toffoli gate with one control
// tied to 1 acts as a Feynman gate). Two Peres gates make a reversible full adder
// (peres_full_adder), the cell of the processor's ripple carry adder. Purely
// combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  logic t1_p, t1_q, t2_q;

  toffoli_gate u_t1 (.a(a),    .b(b),    .c(c),    .p(t1_p), .q(t1_q), .r(r));
  toffoli_gate u_t2 (.a(t1_p), .b(1'b1), .c(t1_q), .p(p),    .q(t2_q), .r(q));
endmodule
