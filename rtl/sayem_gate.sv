// Sayem gate (SG): a 4x4 reversible gate
//   P = A
//   Q = A'B xor AC
//   R = A'B xor AC xor D
//   S = AB xor A'C xor D
// With D = 0, Q and R both equal "A ? C : B", a 2:1 multiplexer selected by A,
// so one SG whose R output is fed back to B forms a D latch (A = clock,
// C = data). S is the opposite selection and is normally garbage.
// Purely combinational, no timing. The equations are the gate's definition.
module sayem_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic sel;    // A'B xor AC
  assign sel = (~a & b) ^ (a & c);
  assign p = a;
  assign q = sel;
  assign r = sel ^ d;
  assign s = (a & b) ^ (~a & c) ^ d;
endmodule
