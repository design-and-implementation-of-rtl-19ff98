// tb_fredkin_gate: exhaustive check of the Fredkin gate as a controlled swap
// (B and C pass when A = 0, swap when A = 1) and of its reversibility.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen = '0;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic eq, er;
      {c, b, a} = 3'(i);
      #1;
      if (a) begin eq = c; er = b; end
      else   begin eq = b; er = c; end
      checks++;
      if (p !== a || q !== eq || r !== er) begin
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
