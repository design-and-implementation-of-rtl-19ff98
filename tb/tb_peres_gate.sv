// tb_peres_gate: exhaustive check of the Peres gate. With C = 0 it must be a
// half adder (Q + 2R = A + B); with C = 1, R is the complement of the AND.
// Also checks reversibility.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen = '0;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int total;
      logic er;
      {c, b, a} = 3'(i);
      #1;
      total = int'(a) + int'(b);
      er = (total == 2) ? ~c : c;
      checks++;
      if (p !== a || q !== (total == 1) || r !== er) begin
        failures++;
        $display("FAIL abc=%b%b%b pqr=%b%b%b", a, b, c, p, q, r);
      end
      seen[{r, q, p}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin failures++; $display("FAIL not a bijection"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
