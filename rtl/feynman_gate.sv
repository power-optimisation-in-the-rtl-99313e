// Feynman gate (FG): the 2x2 reversible gate P = A, Q = A xor B.
// With B tied to 0 it copies A onto both outputs, which is how the shift
// register and flip-flop circuits of this design obtain fan-out, since a
// reversible circuit may not branch a wire. Purely combinational, no timing.
// The mapping is the standard one; nothing here is a design choice.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
