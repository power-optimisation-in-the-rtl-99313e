// RSJ gate: the 4x4 reversible gate the down counter uses after a T
// flip-flop, to pass on a copy of its Q output and to form the toggle enable
// of the next stage. Its mapping here is
//   P = A,  Q = A'B xor C,  R = A'B xor D,  S = B
// which is a bijection (A and B reappear on P and S, so C and D can be
// recovered from Q and R). With C = D = 0 and A = Q of a stage, B = the
// stage's own enable: P is the copy of Q, Q and R are two copies of the next
// enable "B and not A" (one for the next flip-flop's T, one to carry the
// chain on), and S is garbage. The role (copying Q for the counter) is the
// original design's; this exact mapping is this design's choice, made so that the
// gate has the two constant inputs the counter drawing shows.
// Purely combinational.
module rsj_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic en_next;  // A'B
  assign en_next = ~a & b;
  assign p = a;
  assign q = en_next ^ c;
  assign r = en_next ^ d;
  assign s = b;
endmodule
