// Self-checking testbench for rev_dff.
// Drives random CLK levels (ck) and data on the falling edge of clk and
// compares q after every rising edge with a reference that applies
// Q+ = D.CLK + Q.CLK' once per clk cycle. Every row of the D flip-flop
// truth table (CLK, D, previous Q) must occur. ck_out must repeat ck.
// The loaded bit must be visible exactly one clk cycle after the ck cycle.
module tb_rev_dff;
  logic clk = 1'b0, rst_n, ck, d, ck_out, q;
  logic q_ref;
  logic [7:0] rows_seen;
  int checks = 0, failures = 0;

  rev_dff dut (.clk(clk), .rst_n(rst_n), .ck(ck), .d(d), .ck_out(ck_out), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rows_seen = '0;
    rst_n = 1'b0; ck = 1'b0; d = 1'b0;
    @(posedge clk); @(negedge clk);
    rst_n = 1'b1;
    q_ref = 1'b0;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset q=%0b", q); end
    for (int i = 0; i < 400; i++) begin
      ck = 1'($urandom);
      d  = 1'($urandom);
      #1;
      checks++;
      if (ck_out !== ck) begin failures++; $display("FAIL ck_out"); end
      rows_seen[{ck, d, q_ref}] = 1'b1;
      @(posedge clk);
      q_ref = ck ? d : q_ref;
      #1;
      checks++;
      if (q !== q_ref) begin
        failures++;
        $display("FAIL cycle %0d ck=%0b d=%0b q=%0b exp %0b", i, ck, d, q, q_ref);
      end
      @(negedge clk);
    end
    checks++;
    if (rows_seen !== 8'hFF) begin
      failures++;
      $display("FAIL not every truth-table row was exercised: %b", rows_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
