// tb_bcd_adder: the cascaded BCD adder against integer addition. Directed
// cases (zero, a carry rippling through every digit, the largest sum) are
// followed by random packed-BCD operands. Checks the sum digits, the carry
// out of every digit and the final carry, at the adder's default size
// (8 digits, 32 bits).
module tb_bcd_adder;
  localparam int unsigned DIGITS = bcd_pkg::BCD_DIGITS;
  localparam int unsigned N_RANDOM = 5000;
  import tb_bcd_util_pkg::*;
  localparam int unsigned W = 4 * DIGITS;

  logic [W-1:0] a, b, s;
  logic [DIGITS-1:0] cout;
  int checks = 0, failures = 0;

  bcd_adder dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [63:0] va, logic [63:0] vb);
    longint unsigned exp_total;
    logic [63:0] exp_s;
    logic [15:0] exp_c;
    a = va[W-1:0];
    b = vb[W-1:0];
    #1;
    exp_total = bcd2int(va, DIGITS) + bcd2int(vb, DIGITS);
    exp_s = int2bcd(exp_total % pow10(DIGITS), DIGITS);
    exp_c = add_carries(va, vb, DIGITS);
    checks++;
    if (s !== exp_s[W-1:0] || cout !== exp_c[DIGITS-1:0]
        || cout[DIGITS-1] !== (exp_total >= pow10(DIGITS))) begin
      failures++;
      $display("FAIL %h + %h gave %h carries %b", a, b, s, cout);
    end
  endtask

  initial begin
    apply('0, '0);
    apply(int2bcd(pow10(DIGITS) - 1, DIGITS), int2bcd(1, DIGITS));
    apply(int2bcd(pow10(DIGITS) - 1, DIGITS), int2bcd(pow10(DIGITS) - 1, DIGITS));
    apply(int2bcd(5, DIGITS), int2bcd(5, DIGITS));
    for (int i = 0; i < int'(N_RANDOM); i++) apply(rand_bcd(DIGITS), rand_bcd(DIGITS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
