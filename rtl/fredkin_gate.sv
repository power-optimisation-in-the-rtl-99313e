// Fredkin gate (FRG): the 3x3 reversible controlled swap
//   P = A,  Q = A'B xor AC,  R = A'C xor AB.
// A = 0 passes B and C straight through, A = 1 swaps them. It conserves the
// number of ones. Purely combinational. None of the flip-flop circuits of
// this design uses it; it is provided as a stand-alone gate.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
