// Self-checking testbench for feynman_gate: all four input pairs against
// the gate's truth table, plus a check that the mapping is a bijection.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  logic [3:0] seen;
  // expected {p,q} for input index {a,b}, written out as a table
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL a=%0b b=%0b got %b exp %b", a, b, {p, q}, EXP[i]);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin
      failures++;
      $display("FAIL mapping is not a bijection");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
