// bvppg_gate: 5x5 reversible partial-product generator gate (BVPPG).
//
// Inputs (A, B, C, D, E), outputs
//   P = A, Q = B, R = (A and B) xor C, S = D, T = (B and D) xor E.
// With C = E = 0 one gate yields two partial products of a multiplier, A*B on R
// and D*B on T, while P, Q and S pass the operand bits on so that no separate
// fan-out gates are needed. Quantum cost 10. The R/T product behaviour with
// constant-zero C and E, and P, Q, S as fan-out, are as the design describes; the
// exact output equations are the gate's standard published definition.
// Purely combinational.
module bvppg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
  assign s = d;
  assign t = (b & d) ^ e;
endmodule
