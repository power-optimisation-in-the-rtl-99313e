// Reversible 4-bit synchronous down counter.
//
// Four reversible T flip-flops (rev_tff) share the count pulse: it enters
// the first flip-flop's CLK and passes from each CLK output to the next CLK
// input. A down counter toggles bit i when counting is enabled and every
// lower bit is 0, so the toggle enables form the chain
//   T0 = en,  T1 = T0 & ~QA,  T2 = T1 & ~QB,  T3 = T2 & ~QC.
// After flip-flops A and B an RSJ gate (A = Q, B = incoming enable, C = D =
// 0) gives the copy of Q brought out as QA/QB, the next enable for the next
// flip-flop's T, and a second copy of that enable to carry the chain on.
// After flip-flop C a Peres gate with C = 0 forms the last AND; its A input
// takes QC through a reversible NOT so that it selects QC = 0, and a second
// NOT on its P output restores QC, which is brought out from there. Gates: 12
// in the flip-flops, 2 RSJ, 1 Peres = 15 (plus the two one-line NOTs);
// constant inputs 8 + 4 + 1 = 13; garbage outputs 12 (two S outputs per
// flip-flop, the last CLK out, the two RSJ S outputs, the Peres Q output).
//
// The counting direction, the structure and the gate and constant counts are
// the original design's. The RSJ mapping (see rsj_gate), the two NOTs around
// the Peres gate, and the reset are this design's choices.
//
// Timing: the count decrements (wrapping 0 -> 15) once per ck pulse while
// count_en is 1. A ck pulse must be followed by at least one clk cycle with
// ck = 0; the new count appears two clk edges after a one-cycle pulse starts
// (see rev_tff). rst_n (synchronous, active low) sets the count to 0.
//
// Ports: clk, rst_n (system), ck (COUNT PULSES), count_en (COUNT ENABLE),
// ck_out (CLK out of the last flip-flop), q = {QD, QC, QB, QA}.
module rev_down_counter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ck,
  input  logic       count_en,
  output logic       ck_out,
  output logic [3:0] q
);
  logic [4:0] ck_chain;  // CLK passed flip-flop to flip-flop
  logic [3:0] t;         // toggle enables
  logic [3:0] q_ff;      // flip-flop Q outputs
  logic       chain1, chain2;  // carried enable copies from the RSJ gates
  logic       qc_n;            // ~QC into the Peres gate
  logic       qc_n_copy;       // Peres P output, ~QC passed through

  assign ck_chain[0] = ck;
  assign t[0]        = count_en;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    rev_tff u_tff (
      .clk(clk), .rst_n(rst_n),
      .ck(ck_chain[i]), .t(t[i]),
      .ck_out(ck_chain[i+1]), .q(q_ff[i])
    );
  end

  rsj_gate u_rsj1 (
    .a(q_ff[0]), .b(t[0]), .c(1'b0), .d(1'b0),
    .p(q[0]), .q(t[1]), .r(chain1), .s()
  );

  rsj_gate u_rsj2 (
    .a(q_ff[1]), .b(chain1), .c(1'b0), .d(1'b0),
    .p(q[1]), .q(t[2]), .r(chain2), .s()
  );

  assign qc_n = ~q_ff[2];

  peres_gate u_pg (
    .a(qc_n), .b(chain2), .c(1'b0),
    .p(qc_n_copy), .q(), .r(t[3])
  );

  assign q[2]   = ~qc_n_copy;
  assign q[3]   = q_ff[3];
  assign ck_out = ck_chain[4];
endmodule
