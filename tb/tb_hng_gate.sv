// tb_hng_gate: exhaustive check of the HNG gate. With D = 0, R and S must be
// the sum and carry of A + B + C; D toggles S. P and Q pass A and B. Also
// checks reversibility over all 16 inputs.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen = '0;

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int total;
      {d, c, b, a} = 4'(i);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== total[0] || s !== (total[1] ^ d)) begin
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
