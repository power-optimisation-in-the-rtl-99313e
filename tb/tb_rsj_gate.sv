// Self-checking testbench for rsj_gate: all sixteen inputs against
// P = A, Q = (B and not A) xor C, R = (B and not A) xor D, S = B, the
// counter's use (C = D = 0: copy of A, two copies of the next enable), and
// a bijection check.
module tb_rsj_gate;
  logic a, b, c, d, p, q, r, s;
  logic en;
  logic [3:0] exp_o;
  logic [15:0] seen;
  int checks = 0, failures = 0;

  rsj_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

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
      en = (a == 1'b0) && (b == 1'b1);
      exp_o = {a, en ^ c, en ^ d, b};
      checks++;
      if ({p, q, r, s} !== exp_o) begin
        failures++;
        $display("FAIL in=%04b got %04b exp %04b", i[3:0], {p, q, r, s}, exp_o);
      end
      if (!c && !d) begin
        checks++;
        if (p !== a || q !== r || q !== (b & ~a)) begin
          failures++;
          $display("FAIL counter use a=%0b b=%0b", a, b);
        end
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
