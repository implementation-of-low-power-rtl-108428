// toffoli_gate: 3x3 reversible Toffoli gate with two control inputs.
//
// Inputs (A, B, C), outputs P = A, Q = B, R = (A and B) xor C; quantum cost 5.
// With C = 0 the target output is A AND B, with C = 1 it is A NAND B; the FCU
// uses it for exactly those two operations. Purely combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
