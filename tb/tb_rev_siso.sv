// Self-checking testbench for rev_siso at its default width (4 bits).
// Random shift strobes and serial data; a reference queue of the last N
// shifted-in bits gives the expected serial output after every clk cycle.
// Also checks the latency: a bit entered with ck = 1 appears on so after
// exactly N shifting cycles.
module tb_rev_siso;
  localparam int N = 4;
  logic clk = 1'b0, rst_n, ck, si, ck_out, so;
  logic [N-1:0] ref_sr;   // ref_sr[N-1] is the rightmost flip-flop
  int checks = 0, failures = 0;
  int shifts = 0;

  rev_siso dut (.clk(clk), .rst_n(rst_n), .ck(ck), .si(si), .ck_out(ck_out), .so(so));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; ck = 1'b0; si = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    ref_sr = '0;
    // latency: a single 1 followed by zeros, shifting every cycle
    ck = 1'b1; si = 1'b1;
    for (int k = 1; k <= N + 1; k++) begin
      @(posedge clk); #1;
      checks++;
      if (so !== (k == N)) begin
        failures++;
        $display("FAIL latency: after %0d shifts so=%0b", k, so);
      end
      @(negedge clk);
      si = 1'b0;
    end
    ref_sr = '0;
    for (int i = 0; i < 400; i++) begin
      ck = ($urandom % 4) != 0;
      si = 1'($urandom);
      #1;
      checks++;
      if (ck_out !== ck) begin failures++; $display("FAIL ck_out"); end
      @(posedge clk);
      if (ck) begin
        ref_sr = {ref_sr[N-2:0], si};
        shifts++;
      end
      #1;
      checks++;
      if (so !== ref_sr[N-1]) begin
        failures++;
        $display("FAIL cycle %0d so=%0b exp %0b", i, so, ref_sr[N-1]);
      end
      @(negedge clk);
    end
    $display("shifts=%0d", shifts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
