// Walks the truth tables of the two reversible flip-flops row by row, in
// the order they are usually printed, and checks Q against the table.
//
// D flip-flop (rev_dff), rows {CLK, D, Q(t-1)} -> Q:
//   CLK = 0 holds Q(t-1); CLK = 1 loads D. A row is applied as one clk cycle
//   with ck = CLK, after first loading Q(t-1).
// T flip-flop (rev_tff), rows {CLK, T, Q(t-1)} -> Q:
//   CLK = 0 (no pulse) holds; CLK = 1 (one complete ck pulse) gives
//   Q(t-1) xor T. Q(t-1) is set up by reset and, if 1, one toggle pulse.
module tb_flipflop_truth_tables;
  logic clk = 1'b0, rst_n;
  logic d_ck, d_d, d_ck_out, d_q;
  logic t_ck, t_t, t_ck_out, t_q;
  int checks = 0, failures = 0;

  // Table rows: {CLK, input, Q(t-1), Q}
  localparam logic [3:0] DFF_TABLE [8] = '{
    4'b0000, 4'b0011, 4'b0100, 4'b0111,
    4'b1000, 4'b1010, 4'b1101, 4'b1111 };
  localparam logic [3:0] TFF_TABLE [8] = '{
    4'b0000, 4'b1000, 4'b0011, 4'b1011,
    4'b0100, 4'b1101, 4'b0111, 4'b1110 };

  rev_dff u_dff (.clk(clk), .rst_n(rst_n), .ck(d_ck), .d(d_d), .ck_out(d_ck_out), .q(d_q));
  rev_tff u_tff (.clk(clk), .rst_n(rst_n), .ck(t_ck), .t(t_t), .ck_out(t_ck_out), .q(t_q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tff_pulse(input logic t);
    t_t = t; t_ck = 1'b1;
    @(negedge clk);
    t_ck = 1'b0;
    @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0;
    {d_ck, d_d, t_ck, t_t} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // D flip-flop
    foreach (DFF_TABLE[i]) begin
      // set Q(t-1)
      d_ck = 1'b1; d_d = DFF_TABLE[i][1];
      @(negedge clk);
      checks++;
      if (d_q !== DFF_TABLE[i][1]) begin
        failures++; $display("FAIL D row %0d: could not set Q(t-1)", i);
      end
      // apply the row
      d_ck = DFF_TABLE[i][3]; d_d = DFF_TABLE[i][2];
      @(negedge clk);
      checks++;
      if (d_q !== DFF_TABLE[i][0]) begin
        failures++;
        $display("FAIL D row %0d: CLK=%0b D=%0b Qt-1=%0b Q=%0b exp %0b", i,
                 DFF_TABLE[i][3], DFF_TABLE[i][2], DFF_TABLE[i][1], d_q, DFF_TABLE[i][0]);
      end
    end
    d_ck = 1'b0;

    // T flip-flop
    foreach (TFF_TABLE[i]) begin
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      if (TFF_TABLE[i][1]) tff_pulse(1'b1);
      checks++;
      if (t_q !== TFF_TABLE[i][1]) begin
        failures++; $display("FAIL T row %0d: could not set Q(t-1)", i);
      end
      t_t = TFF_TABLE[i][2];
      if (TFF_TABLE[i][3]) tff_pulse(TFF_TABLE[i][2]);
      else repeat (3) @(negedge clk);
      checks++;
      if (t_q !== TFF_TABLE[i][0]) begin
        failures++;
        $display("FAIL T row %0d: CLK=%0b T=%0b Qt-1=%0b Q=%0b exp %0b", i,
                 TFF_TABLE[i][3], TFF_TABLE[i][2], TFF_TABLE[i][1], t_q, TFF_TABLE[i][0]);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
