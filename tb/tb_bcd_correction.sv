// tb_bcd_correction: every binary digit sum 0..19 must come out as its units
// digit (sum mod 10) with the decimal carry set for sums of 10 and more.
module tb_bcd_correction;
  logic [3:0] s, d;
  logic c4, cout;
  int checks = 0, failures = 0;

  bcd_correction dut (.s(s), .c4(c4), .d(d), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n <= 19; n++) begin
      {c4, s} = 5'(n);
      #1;
      checks++;
      if (int'(d) != n % 10 || cout !== (n >= 10)) begin
        failures++;
        $display("FAIL sum %0d gave digit %0d carry %b", n, d, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
