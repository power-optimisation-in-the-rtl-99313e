// Self-checking testbench for sayem_gate: all sixteen inputs. The expected
// outputs are worked out from the gate's multiplexer reading: with m =
// (A ? C : B) and n = (A ? B : C), P = A, Q = m, R = m xor D, S = n xor D.
// Also checks that the mapping is a bijection.
module tb_sayem_gate;
  logic a, b, c, d, p, q, r, s;
  logic m, n;
  logic [3:0] exp_o;
  logic [15:0] seen;
  int checks = 0, failures = 0;

  sayem_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      m = a ? c : b;
      n = a ? b : c;
      exp_o = {a, m, m ^ d, n ^ d};
      checks++;
      if ({p, q, r, s} !== exp_o) begin
        failures++;
        $display("FAIL in=%04b got %04b exp %04b", i[3:0], {p, q, r, s}, exp_o);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("FAIL mapping is not a bijection");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
