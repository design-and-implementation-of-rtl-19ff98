// tb_bcd_subtractor: the nine's complement subtractor against integer
// subtraction. For a > b the magnitude a - b with neg = 0 is expected, for
// a <= b the magnitude b - a with neg = 1 (so a = b gives 0 with neg = 1,
// the negative zero of the method). The stage-1 digit carries are checked
// against the digit-by-digit decimal addition of a and nines(b). Directed
// cases cover both signs, equality and the extremes; then random operands.
module tb_bcd_subtractor;
  localparam int unsigned DIGITS = bcd_pkg::BCD_DIGITS;
  localparam int unsigned N_RANDOM = 5000;
  import tb_bcd_util_pkg::*;
  localparam int unsigned W = 4 * DIGITS;

  logic [W-1:0] a, b, diff;
  logic neg;
  logic [DIGITS-1:0] cout;
  int checks = 0, failures = 0;

  bcd_subtractor dut (.a(a), .b(b), .diff(diff), .neg(neg), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [63:0] va, logic [63:0] vb);
    longint unsigned ia, ib, mag;
    logic exp_neg;
    logic [63:0] exp_d;
    logic [15:0] exp_c;
    a = va[W-1:0];
    b = vb[W-1:0];
    #1;
    ia = bcd2int(va, DIGITS);
    ib = bcd2int(vb, DIGITS);
    exp_neg = (ia <= ib);
    mag = exp_neg ? ib - ia : ia - ib;
    exp_d = int2bcd(mag, DIGITS);
    exp_c = add_carries(va, nines(vb, DIGITS), DIGITS);
    checks++;
    if (diff !== exp_d[W-1:0] || neg !== exp_neg || cout !== exp_c[DIGITS-1:0]) begin
      failures++;
      $display("FAIL %h - %h gave %h neg %b carries %b", a, b, diff, neg, cout);
    end
  endtask

  initial begin
    apply(int2bcd(7, DIGITS), int2bcd(3, DIGITS));
    apply(int2bcd(3, DIGITS), int2bcd(7, DIGITS));
    apply(int2bcd(42, DIGITS), int2bcd(42, DIGITS));
    apply('0, '0);
    apply(int2bcd(pow10(DIGITS) - 1, DIGITS), '0);
    apply('0, int2bcd(pow10(DIGITS) - 1, DIGITS));
    apply(int2bcd(pow10(DIGITS) / 10, DIGITS), int2bcd(1, DIGITS));
    for (int i = 0; i < int'(N_RANDOM); i++) apply(rand_bcd(DIGITS), rand_bcd(DIGITS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
