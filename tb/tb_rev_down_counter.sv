// Self-checking testbench for rev_down_counter.
// Counts through more than two full cycles with count pulses of random
// length (1 to 3 clk cycles) and gaps of random length (1 to 3 cycles),
// with COUNT ENABLE mostly on. Reference: every complete pulse with the
// enable set takes the count to (count - 1) mod 16; with it clear the count
// holds. Checks the value after every gap cycle, that the count never moves
// while ck is high, that after a one-cycle pulse the new value appears on
// the second clk edge (not the first), and that the 0 -> 15 wrap and the
// hold case both happen.
module tb_rev_down_counter;
  logic clk = 1'b0, rst_n, ck, en, ck_out;
  logic [3:0] q, q_ref, q_before;
  int checks = 0, failures = 0;
  int wraps = 0, holds = 0, steps = 0;
  int hi_len, lo_len;

  rev_down_counter dut (.clk(clk), .rst_n(rst_n), .ck(ck), .count_en(en),
                        .ck_out(ck_out), .q(q));

  always #5 clk = ~clk;

  // the count may only step down by one or stay
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      assert (q == q_before || q == q_before - 4'd1 || q == q_ref)
        else begin failures++; $display("FAIL illegal step %0d -> %0d", q_before, q); end
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; ck = 1'b0; en = 1'b0;
    q_before = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    q_ref = '0;
    checks++;
    if (q !== 4'd0) begin failures++; $display("FAIL reset q=%0d", q); end
    // latency of a one-cycle pulse
    en = 1'b1; ck = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (q !== 4'd0) begin failures++; $display("FAIL count moved on the first edge"); end
    @(negedge clk); ck = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (q !== 4'd15) begin failures++; $display("FAIL latency: q=%0d exp 15", q); end
    wraps++;
    q_ref = 4'd15;
    q_before = q_ref;
    @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      hi_len = 1 + ($urandom % 3);
      lo_len = 1 + ($urandom % 3);
      en = ($urandom % 5) != 0;
      q_before = q_ref;
      ck = 1'b1;
      for (int k = 0; k < hi_len; k++) begin
        #1;
        checks++;
        if (ck_out !== 1'b1) begin failures++; $display("FAIL ck_out"); end
        checks++;
        if (q !== q_before) begin failures++; $display("FAIL q moved while ck high"); end
        @(negedge clk);
      end
      ck = 1'b0;
      if (en) begin
        if (q_ref == 4'd0) wraps++;
        q_ref = q_ref - 4'd1;
        steps++;
      end else begin
        holds++;
      end
      for (int k = 0; k < lo_len; k++) begin
        @(posedge clk); #1;
        checks++;
        if (q !== q_ref) begin
          failures++;
          $display("FAIL pulse %0d: en=%0b q=%0d exp %0d", i, en, q, q_ref);
        end
        @(negedge clk);
        q_before = q_ref;
      end
    end
    checks++;
    if (wraps < 2 || holds < 1) begin
      failures++;
      $display("FAIL coverage wraps=%0d holds=%0d", wraps, holds);
    end
    $display("steps=%0d wraps=%0d holds=%0d", steps, wraps, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
