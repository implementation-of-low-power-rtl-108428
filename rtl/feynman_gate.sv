// feynman_gate: 2x2 reversible Feynman gate, also called the CNOT
// (controlled-NOT) gate.
//
// Inputs (A, B), outputs P = A and Q = A xor B; quantum cost 1. The mapping is
// one-to-one, so (A, B) can be recovered from (P, Q). With B = 0 it copies A
// (reversible fan-out); with A = 1 it inverts B. The FCU uses it as an XOR, as a
// conditional inverter for subtraction and as an inverter. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
