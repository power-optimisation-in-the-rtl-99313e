// Self-checking testbench for fredkin_gate: A = 0 passes B and C, A = 1 swaps
// them; checks all eight inputs, conservation of ones, and bijection.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;
  logic [2:0] exp_o;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      exp_o = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== exp_o) begin
        failures++;
        $display("FAIL in=%03b got %03b exp %03b", i[2:0], {p, q, r}, exp_o);
      end
      checks++;
      if ($countones({p, q, r}) != $countones({a, b, c})) begin
        failures++;
        $display("FAIL ones not conserved for in=%03b", i[2:0]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL mapping is not a bijection");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
