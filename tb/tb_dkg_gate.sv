// tb_dkg_gate: exhaustive check of the DKG gate. A = 0: R, S are the carry and
// sum of B + C + D. A = 1: R, S are the borrow and difference of B - C - D.
// P = B, and Q selects C (A = 0) or the complement of D (A = 1). Also checks
// reversibility over all 16 inputs.
module tb_dkg_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen = '0;

  dkg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int t;
      logic er, es, eq;
      {d, c, b, a} = 4'(i);
      #1;
      if (!a) begin
        t  = int'(b) + int'(c) + int'(d);
        er = (t >= 2);
        es = (t % 2) == 1;
        eq = c;
      end else begin
        t  = int'(b) - int'(c) - int'(d);
        er = (t < 0);
        es = ((t + 2) % 2) == 1;
        eq = !d;
      end
      checks++;
      if (p !== b || q !== eq || r !== er || s !== es) begin
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
