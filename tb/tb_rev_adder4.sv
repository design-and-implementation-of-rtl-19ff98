// tb_rev_adder4: exhaustive check of the 4-bit reversible adder: all 512
// combinations of a, b and cin against the integer sum {cout, sum}.
module tb_rev_adder4;
  logic [3:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  rev_adder4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      int exp_total;
      {cin, b, a} = 9'(i);
      #1;
      exp_total = int'(a) + int'(b) + int'(cin);
      checks++;
      if (int'({cout, sum}) != exp_total) begin
        failures++;
        $display("FAIL %0d+%0d+%0d gave %0d", a, b, cin, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
