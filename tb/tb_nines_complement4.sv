// tb_nines_complement4: each BCD digit b must give 9 - b.
module tb_nines_complement4;
  logic [3:0] b, nc;
  int checks = 0, failures = 0;

  nines_complement4 dut (.b(b), .nc(nc));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10; n++) begin
      b = 4'(n);
      #1;
      checks++;
      if (int'(nc) != 9 - n) begin
        failures++;
        $display("FAIL nines(%0d) gave %0d", n, nc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
