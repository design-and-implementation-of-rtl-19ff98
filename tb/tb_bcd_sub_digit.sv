// tb_bcd_sub_digit: all 200 combinations of a, b and cin; the digit must give
// (a + 9 - b + cin) mod 10 and its decimal carry.
module tb_bcd_sub_digit;
  logic [3:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  bcd_sub_digit dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 10; x++)
      for (int y = 0; y < 10; y++)
        for (int c = 0; c < 2; c++) begin
          int t;
          a = 4'(x); b = 4'(y); cin = 1'(c);
          #1;
          t = x + (9 - y) + c;
          checks++;
          if (int'(s) != t % 10 || cout !== (t >= 10)) begin
            failures++;
            $display("FAIL %0d-%0d (cin %0d) gave %0d carry %b", x, y, c, s, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
