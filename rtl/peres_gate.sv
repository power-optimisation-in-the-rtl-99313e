// Peres gate (PG), also called the New Toffoli gate: the 3x3 reversible gate
//   P = A,  Q = A xor B,  R = AB xor C.
// It equals a Toffoli gate followed by a Feynman gate. With C = 0 it gives
// A and B (R) and A xor B (Q) at once, so one PG is a half adder, and in the
// counter it supplies an AND term. Purely combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
