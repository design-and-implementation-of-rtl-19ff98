// tb_bcd_adder_digit: all 200 combinations of two BCD digits and a carry in,
// checked against integer addition (digit = total mod 10, carry = total >= 10).
module tb_bcd_adder_digit;
  logic [3:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  bcd_adder_digit dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

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
          t = x + y + c;
          checks++;
          if (int'(s) != t % 10 || cout !== (t >= 10)) begin
            failures++;
            $display("FAIL %0d+%0d+%0d gave %0d carry %b", x, y, c, s, cout);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
