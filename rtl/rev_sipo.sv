// Reversible serial-in parallel-out shift register.
//
// N reversible D flip-flops (rev_dff) in a row, as in the serial-in
// serial-out register, with a Feynman gate (B = 0) after each of the first
// N-1 flip-flops: a reversible circuit cannot branch a wire, so the gate
// makes the second copy of Q. Its P output drives D of the next flip-flop and
// its Q output is the parallel output o[i]. The last flip-flop's Q is both
// o[N-1] and the serial output. For N = 4 that is 7 gates and 7 constant
// inputs.
//
// Timing: every clk cycle with ck = 1 shifts the contents one place toward
// o[N-1]; o[0] holds the most recent bit. After N shifts o[N-1..0] holds the
// last N serial bits, oldest in o[N-1]. The original register is 4 bits
// wide (N = 4); the width parameter, and which Feynman output goes where,
// are this design's choices.
//
// Ports: clk, rst_n (system, synchronous active-low reset), ck (shift
// strobe, the circuit's CLK), si, ck_out, o.
module rev_sipo #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ck,
  input  logic         si,
  output logic         ck_out,
  output logic [N-1:0] o
);
  logic [N:0]   ck_chain;
  logic [N-1:0] d_in;    // D input of each flip-flop
  logic [N-1:0] q_ff;    // Q output of each flip-flop

  assign ck_chain[0] = ck;
  assign d_in[0]     = si;

  for (genvar i = 0; i < N; i++) begin : g_stage
    rev_dff u_ff (
      .clk(clk), .rst_n(rst_n),
      .ck(ck_chain[i]), .d(d_in[i]),
      .ck_out(ck_chain[i+1]), .q(q_ff[i])
    );
    if (i < N - 1) begin : g_copy
      feynman_gate u_fg (.a(q_ff[i]), .b(1'b0), .p(d_in[i+1]), .q(o[i]));
    end else begin : g_last
      assign o[i] = q_ff[i];
    end
  end

  assign ck_out = ck_chain[N];
endmodule
