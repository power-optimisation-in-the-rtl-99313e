// Reversible sequential circuits, side by side.
//
// The design is a set of small circuits built only from reversible gates
// (Feynman, Sayem, Peres, Fredkin and an RSJ copy gate): a serial-in
// serial-out and a serial-in parallel-out shift register made of
// single-gate D flip-flops, a 4-bit synchronous down counter made of
// master-slave T flip-flops, and a one-gate half adder. The circuits do not
// feed one another; this top places them next to each other, shares the
// system clock and reset, and brings out each circuit's own ports with a
// prefix. A stand-alone Fredkin gate is brought out as well.
//
// Every `*_ck` input is that circuit's own CLK (shift strobe or count
// pulse), sampled on the rising edge of clk; see rev_dff and rev_tff for the
// timing. rst_n is synchronous and active low.
module rev_seq_top #(
  parameter int unsigned SR_BITS = 4   // shift register width
) (
  input  logic               clk,
  input  logic               rst_n,
  // serial-in serial-out shift register
  input  logic               siso_ck,
  input  logic               siso_si,
  output logic               siso_ck_out,
  output logic               siso_so,
  // serial-in parallel-out shift register
  input  logic               sipo_ck,
  input  logic               sipo_si,
  output logic               sipo_ck_out,
  output logic [SR_BITS-1:0] sipo_o,
  // 4-bit synchronous down counter
  input  logic               cnt_ck,
  input  logic               cnt_en,
  output logic               cnt_ck_out,
  output logic [3:0]         cnt_q,
  // half adder
  input  logic               ha_a,
  input  logic               ha_b,
  output logic               ha_sum,
  output logic               ha_carry,
  // Fredkin gate
  input  logic               frg_a,
  input  logic               frg_b,
  input  logic               frg_c,
  output logic               frg_p,
  output logic               frg_q,
  output logic               frg_r
);
  rev_siso #(.N(SR_BITS)) u_siso (
    .clk(clk), .rst_n(rst_n), .ck(siso_ck), .si(siso_si),
    .ck_out(siso_ck_out), .so(siso_so)
  );

  rev_sipo #(.N(SR_BITS)) u_sipo (
    .clk(clk), .rst_n(rst_n), .ck(sipo_ck), .si(sipo_si),
    .ck_out(sipo_ck_out), .o(sipo_o)
  );

  rev_down_counter u_cnt (
    .clk(clk), .rst_n(rst_n), .ck(cnt_ck), .count_en(cnt_en),
    .ck_out(cnt_ck_out), .q(cnt_q)
  );

  rev_half_adder u_ha (
    .a(ha_a), .b(ha_b), .sum(ha_sum), .carry(ha_carry)
  );

  fredkin_gate u_frg (
    .a(frg_a), .b(frg_b), .c(frg_c),
    .p(frg_p), .q(frg_q), .r(frg_r)
  );
endmodule
