// Reversible half adder: one Peres gate with its third input tied to 0.
// Its Q output is the sum A xor B and its R output the carry A and B; the
// P output (a copy of A) is garbage. One gate, one constant input, one
// garbage output. Purely combinational. That the half adder is a single
// reversible cell follows the original design; that this cell is a Peres gate is this
// design's choice.
module rev_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  peres_gate g1 (.a(a), .b(b), .c(1'b0), .p(), .q(sum), .r(carry));
endmodule
