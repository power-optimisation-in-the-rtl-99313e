// Self-checking testbench for rev_sipo at its default width (4 bits).
// Random shift strobes and serial data; a reference shift register gives
// the expected parallel outputs (o[0] = newest bit, o[N-1] = serial output)
// after every clk cycle. Also checks that after N consecutive shifts the
// parallel word equals the N serial bits entered.
module tb_rev_sipo;
  localparam int N = 4;
  logic clk = 1'b0, rst_n, ck, si, ck_out;
  logic [N-1:0] o, ref_o, word;
  int checks = 0, failures = 0;

  rev_sipo dut (.clk(clk), .rst_n(rst_n), .ck(ck), .si(si), .ck_out(ck_out), .o(o));

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
    checks++;
    if (o !== '0) begin failures++; $display("FAIL reset o=%b", o); end
    // load whole words: N shifts, then read the word in parallel
    for (int w = 0; w < 16; w++) begin
      word = N'($urandom);
      for (int k = N - 1; k >= 0; k--) begin
        ck = 1'b1; si = word[k];   // word[N-1] first, ends in o[N-1]
        @(negedge clk);
      end
      ck = 1'b0;
      checks++;
      if (o !== word) begin
        failures++;
        $display("FAIL word %0d: o=%b exp %b", w, o, word);
      end
    end
    ref_o = o;
    for (int i = 0; i < 400; i++) begin
      ck = ($urandom % 3) != 0;
      si = 1'($urandom);
      #1;
      checks++;
      if (ck_out !== ck) begin failures++; $display("FAIL ck_out"); end
      @(posedge clk);
      if (ck) ref_o = {ref_o[N-2:0], si};
      #1;
      checks++;
      if (o !== ref_o) begin
        failures++;
        $display("FAIL cycle %0d o=%b exp %b", i, o, ref_o);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
