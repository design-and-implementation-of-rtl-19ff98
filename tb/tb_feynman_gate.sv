// tb_feynman_gate: exhaustive check of the Feynman gate against its truth
// table (P = A, Q = 1 when exactly one input is 1), plus a check that the
// four input pairs map to four different output pairs (reversibility).
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  bit [3:0] seen = '0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {b, a} = 2'(i);
      #1;
      checks++;
      if (p !== a || q !== ((int'(a) + int'(b)) % 2 == 1)) begin
        failures++;
        $display("FAIL a=%b b=%b p=%b q=%b", a, b, p, q);
      end
      seen[{q, p}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) begin failures++; $display("FAIL not a bijection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
