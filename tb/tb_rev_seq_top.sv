// End-to-end testbench for rev_seq_top at its default parameters.
// Runs all circuits at once from one random stimulus stream and checks each
// against its own reference every clk cycle:
//   - serial-in serial-out register: so = bit shifted in 4 strobes earlier
//   - serial-in parallel-out register: o = last 4 shifted bits
//   - down counter: one decrement per complete count pulse while enabled
//   - half adder and Fredkin gate: combinational references
// It counts how often each mechanism happened (shift, hold of a register,
// parallel word load, count step, count hold with enable off, 0 -> 15 wrap,
// half-adder carry, Fredkin swap) and counts a failure for any that never
// happened.
module tb_rev_seq_top;
  localparam int N = 4;
  logic clk = 1'b0, rst_n;
  logic siso_ck, siso_si, siso_ck_out, siso_so;
  logic sipo_ck, sipo_si, sipo_ck_out;
  logic [N-1:0] sipo_o;
  logic cnt_ck, cnt_en, cnt_ck_out;
  logic [3:0] cnt_q;
  logic ha_a, ha_b, ha_sum, ha_carry;
  logic frg_a, frg_b, frg_c, frg_p, frg_q, frg_r;

  logic [N-1:0] siso_ref, sipo_ref;
  logic [3:0]   cnt_ref;
  int cnt_phase;      // 0: idle, >0: cycles left in pulse, <0: cycles left in gap
  logic cnt_en_lat;
  int checks = 0, failures = 0;
  int n_shift = 0, n_sr_hold = 0, n_word = 0, n_step = 0, n_cnt_hold = 0;
  int n_wrap = 0, n_carry = 0, n_swap = 0, sipo_run = 0;

  rev_seq_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    {siso_ck, siso_si, sipo_ck, sipo_si, cnt_ck, cnt_en} = '0;
    {ha_a, ha_b, frg_a, frg_b, frg_c} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    siso_ref = '0; sipo_ref = '0; cnt_ref = '0;
    cnt_phase = 0; cnt_en_lat = 1'b0;
    check(siso_so == 1'b0 && sipo_o == '0 && cnt_q == 4'd0, "reset state");

    for (int i = 0; i < 2000; i++) begin
      // stimulus, applied on the falling edge
      siso_ck = ($urandom % 4) != 0;
      siso_si = 1'($urandom);
      sipo_ck = ($urandom % 4) != 0;
      sipo_si = 1'($urandom);
      {ha_a, ha_b} = 2'($urandom);
      {frg_a, frg_b, frg_c} = 3'($urandom);
      if (cnt_phase == 0) begin
        cnt_phase = 1 + int'($urandom % 2);      // pulse length
        cnt_en = ($urandom % 4) != 0;
        cnt_en_lat = cnt_en;
      end
      cnt_ck = cnt_phase > 0;
      #1;
      // combinational parts
      check({ha_carry, ha_sum} == 2'(int'(ha_a) + int'(ha_b)), "half adder");
      if (ha_a && ha_b) n_carry++;
      check({frg_p, frg_q, frg_r} == (frg_a ? {frg_a, frg_c, frg_b} : {frg_a, frg_b, frg_c}),
            "fredkin gate");
      if (frg_a && frg_b != frg_c) n_swap++;
      check(siso_ck_out == siso_ck && sipo_ck_out == sipo_ck && cnt_ck_out == cnt_ck,
            "clock pass-through");

      @(posedge clk);
      // references
      if (siso_ck) begin siso_ref = {siso_ref[N-2:0], siso_si}; n_shift++; end
      else n_sr_hold++;
      if (sipo_ck) begin
        sipo_ref = {sipo_ref[N-2:0], sipo_si};
        sipo_run++;
        if (sipo_run == N) begin n_word++; sipo_run = 0; end
      end
      if (cnt_phase > 0) begin
        cnt_phase--;
        if (cnt_phase == 0) begin
          // pulse ends: the count takes its new value one edge later
          cnt_phase = -(1 + int'($urandom % 2));
          if (cnt_en_lat) begin
            if (cnt_ref == 4'd0) n_wrap++;
            cnt_ref = cnt_ref - 4'd1;
            n_step++;
          end else n_cnt_hold++;
        end
      end else if (cnt_phase < 0) begin
        cnt_phase++;
      end
      #1;
      check(siso_so == siso_ref[N-1], "siso serial output");
      check(sipo_o == sipo_ref, "sipo parallel output");
      // while the pulse is high or in the first edge after, the old value may show
      if (cnt_ck == 1'b0) check(cnt_q == cnt_ref, "counter value");
      @(negedge clk);
    end

    check(n_shift > 0,    "mechanism: shift never happened");
    check(n_sr_hold > 0,  "mechanism: register hold never happened");
    check(n_word > 0,     "mechanism: parallel word never loaded");
    check(n_step > 0,     "mechanism: count step never happened");
    check(n_cnt_hold > 0, "mechanism: count hold never happened");
    check(n_wrap > 0,     "mechanism: count wrap never happened");
    check(n_carry > 0,    "mechanism: half-adder carry never happened");
    check(n_swap > 0,     "mechanism: Fredkin swap never happened");
    $display("shift=%0d sr_hold=%0d word=%0d step=%0d cnt_hold=%0d wrap=%0d carry=%0d swap=%0d",
             n_shift, n_sr_hold, n_word, n_step, n_cnt_hold, n_wrap, n_carry, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
