// tb_tr_gate: exhaustive check of the TR gate. With C = 0 it must be a half
// subtractor of B - A (Q = difference, R = borrow); C toggles R. Also checks
// reversibility.
module tb_tr_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen = '0;

  tr_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int d;
      logic borrow;
      {c, b, a} = 3'(i);
      #1;
      d = int'(b) - int'(a);
      borrow = (d < 0);
      checks++;
      if (p !== a || q !== (d != 0) || r !== (borrow ^ c)) begin
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
