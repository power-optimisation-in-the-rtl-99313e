// Reversible master-slave T flip-flop: two Sayem gates and one Feynman gate.
//
// SG1 is the master latch: A = CLK, B = its own fed-back R output, C = the
// Feynman gate's second output (Q xor T), D = 0. While CLK = 1 the master
// follows Q xor T; while CLK = 0 it holds. SG1's P output (CLK) drives A of
// SG2 and the master value drives B of SG2. SG2 is the slave latch: C = its
// own fed-back R output, D = 0, so it copies the master while CLK = 0 and
// holds while CLK = 1. The Feynman gate takes the slave output and T and
// gives Q (copy) and Q xor T. Three gates, two constant inputs, three garbage
// outputs (the two S outputs and SG2's P output, here ck_out).
//
// Timing model (this design's choice): CLK is the level input `ck` sampled
// on each rising edge of the system clock `clk`, and each latch's feedback
// wire is a register. A ck pulse that lasts one or more clk cycles loads the
// master with q xor t; in the first clk cycle after ck falls the slave takes
// it, so q shows the new value two clk edges after a one-cycle ck pulse
// starts. q changes once per ck pulse, never while ck stays high. The
// original design calls the flip-flop positive-edge triggered; the latch phases
// above follow its wiring, which updates q once the CLK pulse ends.
// rst_n (synchronous, active low) clears both latches; the original design has no
// reset.
//
// Ports: clk, rst_n (system), ck (the circuit's CLK), t, ck_out, q.
module rev_tff (
  input  logic clk,
  input  logic rst_n,
  input  logic ck,
  input  logic t,
  output logic ck_out,
  output logic q
);
  logic master_q, slave_q;   // latch feedback wires, held in registers
  logic master_nx, slave_nx; // R outputs of the two Sayem gates
  logic ck_mid;              // SG1 P -> SG2 A
  logic q_xor_t;             // Feynman gate second output -> SG1 C

  sayem_gate sg1 (
    .a(ck), .b(master_q), .c(q_xor_t), .d(1'b0),
    .p(ck_mid), .q(), .r(master_nx), .s()
  );

  sayem_gate sg2 (
    .a(ck_mid), .b(master_q), .c(slave_q), .d(1'b0),
    .p(ck_out), .q(), .r(slave_nx), .s()
  );

  feynman_gate fg (
    .a(slave_q), .b(t), .p(q), .q(q_xor_t)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      master_q <= 1'b0;
      slave_q  <= 1'b0;
    end else begin
      master_q <= master_nx;
      slave_q  <= slave_nx;
    end
  end
endmodule
