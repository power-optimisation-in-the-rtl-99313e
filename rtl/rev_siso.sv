// Reversible serial-in serial-out right shift register.
//
// N reversible D flip-flops (rev_dff) in a row: the serial input feeds D of
// the leftmost one, each Q feeds D of the next, and the serial output is Q of
// the rightmost. The circuit's CLK enters the first flip-flop and passes from
// each flip-flop's CLK output to the next one's CLK input. N gates and N
// constant inputs in all.
//
// Timing: every clk cycle with ck = 1 shifts the contents one place to the
// right (see rev_dff); a bit presented on si with ck = 1 reaches so after N
// such cycles. The original register is 4 bits wide (N = 4); the width
// parameter is this design's addition.
//
// Ports: clk, rst_n (system, synchronous active-low reset), ck (shift
// strobe, the circuit's CLK), si, ck_out, so.
module rev_siso #(
  parameter int unsigned N = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ck,
  input  logic si,
  output logic ck_out,
  output logic so
);
  logic [N:0] ck_chain;
  logic [N:0] data;

  assign ck_chain[0] = ck;
  assign data[0]     = si;

  for (genvar i = 0; i < N; i++) begin : g_stage
    rev_dff u_ff (
      .clk(clk), .rst_n(rst_n),
      .ck(ck_chain[i]), .d(data[i]),
      .ck_out(ck_chain[i+1]), .q(data[i+1])
    );
  end

  assign ck_out = ck_chain[N];
  assign so     = data[N];
endmodule
