// tb_paog_gate: exhaustive check of the PAOG gate: P = A, Q = parity of A, B,
// R = C toggled when A and B are both 1, S = parity of Q, D and R. Also checks
// reversibility over all 16 inputs.
module tb_paog_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen = '0;

  paog_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic eq, er, es;
      {d, c, b, a} = 4'(i);
      #1;
      eq = ((int'(a) + int'(b)) % 2) == 1;
      er = (a && b) ? !c : c;
      es = ((int'(eq) + int'(d) + int'(er)) % 2) == 1;
      checks++;
      if (p !== a || q !== eq || r !== er || s !== es) begin
        failures++;
        $display("FAIL abcd=%b%b%b%b pqrs=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      seen[{s, r, q, p}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin failures++; $display("FAIL not a bijection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
