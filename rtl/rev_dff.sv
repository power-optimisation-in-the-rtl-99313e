// Reversible D flip-flop built from a single Sayem gate (SG).
//
// The gate is wired as A = CLK, B = its own R output fed back, C = D, D = 0.
// With D = 0 the R output is "CLK ? D : Q", so the loop realises the
// characteristic equation Q+ = D.CLK + Q.CLK'. The P output repeats CLK and
// is brought out as ck_out so that flip-flops can be chained clock-to-clock,
// as the shift registers do. The S output is garbage. One gate, one constant
// input.
//
// Timing model (this design's choice): the circuit's CLK is the level input
// `ck`, and the R-to-B feedback wire is held in a register updated on every
// rising edge of the system clock `clk`. In each clk cycle with ck = 1 the
// flip-flop loads d; with ck = 0 it holds. q is the registered value, so it
// shows the loaded bit one clk cycle after the cycle in which ck was 1.
// rst_n (synchronous, active low) clears it; the original design has no reset.
//
// Ports: clk, rst_n (system), ck (the circuit's CLK), d, ck_out (CLK passed
// through), q.
module rev_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic ck,
  input  logic d,
  output logic ck_out,
  output logic q
);
  logic loop_q;   // the R -> B feedback wire of the Sayem gate
  logic next_q;   // R output: CLK ? D : Q

  sayem_gate sg (
    .a(ck), .b(loop_q), .c(d), .d(1'b0),
    .p(ck_out), .q(), .r(next_q), .s()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) loop_q <= 1'b0;
    else        loop_q <= next_q;
  end

  assign q = loop_q;
endmodule
