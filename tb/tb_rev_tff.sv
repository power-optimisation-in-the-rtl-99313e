// Self-checking testbench for rev_tff.
// Applies ck pulses of random length (1 to 3 clk cycles) separated by gaps
// of random length (1 to 3 cycles) with random T. After every complete
// pulse, q must be the previous q xor T (T sampled during the pulse), which
// covers every row of the T flip-flop truth table. q must not change while
// ck is high, and after a one-cycle pulse the new value must appear exactly
// two clk edges after the pulse started.
module tb_rev_tff;
  logic clk = 1'b0, rst_n, ck, t, ck_out, q;
  logic q_ref, q_before;
  logic [3:0] rows_seen;   // {T, previous Q}
  int checks = 0, failures = 0;
  int hi_len, lo_len;

  rev_tff dut (.clk(clk), .rst_n(rst_n), .ck(ck), .t(t), .ck_out(ck_out), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rows_seen = '0;
    rst_n = 1'b0; ck = 1'b0; t = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    q_ref = 1'b0;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset q=%0b", q); end
    for (int i = 0; i < 300; i++) begin
      hi_len = 1 + ($urandom % 3);
      lo_len = 1 + ($urandom % 3);
      t = 1'($urandom);
      rows_seen[{t, q_ref}] = 1'b1;
      q_before = q;
      ck = 1'b1;
      for (int k = 0; k < hi_len; k++) begin
        #1;
        checks++;
        if (ck_out !== ck) begin failures++; $display("FAIL ck_out"); end
        checks++;
        if (q !== q_before) begin
          failures++;
          $display("FAIL pulse %0d: q changed while ck high", i);
        end
        @(negedge clk);
      end
      ck = 1'b0;
      q_ref = q_ref ^ t;
      for (int k = 0; k < lo_len; k++) begin
        @(posedge clk);
        #1;
        checks++;
        if (q !== q_ref) begin
          failures++;
          $display("FAIL pulse %0d gap %0d: t=%0b q=%0b exp %0b", i, k, t, q, q_ref);
        end
        @(negedge clk);
      end
    end
    checks++;
    if (rows_seen !== 4'hF) begin
      failures++;
      $display("FAIL not every truth-table row was exercised: %b", rows_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
