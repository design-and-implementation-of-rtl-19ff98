// tb_dkg_addsub_digit: all 400 combinations of mode, a, b and cin. Adding:
// digit (a + b + cin) mod 10 and carry. Subtracting: digit (a - b - cin)
// mod 10 and borrow.
module tb_dkg_addsub_digit;
  import bcd_pkg::*;
  addsub_mode_e mode;
  logic [3:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  dkg_addsub_digit dut (.mode(mode), .a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int x = 0; x < 10; x++)
        for (int y = 0; y < 10; y++)
          for (int c = 0; c < 2; c++) begin
            int t, ed;
            logic ec;
            mode = addsub_mode_e'(m);
            a = 4'(x); b = 4'(y); cin = 1'(c);
            #1;
            if (m == 0) begin
              t = x + y + c;
              ed = t % 10;
              ec = (t >= 10);
            end else begin
              t = x - y - c;
              ed = (t + 10) % 10;
              ec = (t < 0);
            end
            checks++;
            if (int'(s) != ed || cout !== ec) begin
              failures++;
              $display("FAIL mode %0d a=%0d b=%0d cin=%0d gave %0d/%b", m, x, y, c, s, cout);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
