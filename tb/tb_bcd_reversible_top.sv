// tb_bcd_reversible_top: end-to-end test of the whole design at its default
// size (8 digits, 32-bit operands; the top takes no parameter override).
// Drives the adder, the subtractor and the DKG adder/subtractor with the same
// random and directed packed-BCD operands, checks every result against
// integer arithmetic, and checks the standalone HNG and PAOG gates on all 16
// inputs. It counts how often each mechanism of the design was needed:
//   digit correction (+0110) in the adder, a carry rippling through every
//   digit, a final carry out; the end-around-carry path and the
//   nine's-complement path of the subtractor and its negative zero; the
//   +0110 and -0110 corrections of the DKG unit and its final borrow; the HNG
//   gate used as a full adder. A mechanism never seen counts as a failure.
module tb_bcd_reversible_top;
  import tb_bcd_util_pkg::*;
  localparam int unsigned DIGITS = 8;
  localparam int unsigned W = 4 * DIGITS;
  localparam int unsigned N_RANDOM = 20000;

  logic [W-1:0] add_a, add_b, add_s, sub_a, sub_b, sub_diff, as_a, as_b, as_s;
  logic [DIGITS-1:0] add_cout, sub_cout, as_cout;
  logic sub_neg, as_mode;
  logic [3:0] hng_in, hng_out, paog_in, paog_out;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_add_fix = 0, n_add_ripple = 0, n_add_cout = 0;
  int n_sub_eac = 0, n_sub_nines = 0, n_sub_negzero = 0;
  int n_as_addfix = 0, n_as_subfix = 0, n_as_borrow = 0;
  int n_hng_fa = 0, n_paog = 0;

  bcd_reversible_top dut (
    .add_a(add_a), .add_b(add_b), .add_s(add_s), .add_cout(add_cout),
    .sub_a(sub_a), .sub_b(sub_b), .sub_diff(sub_diff), .sub_neg(sub_neg), .sub_cout(sub_cout),
    .as_mode(as_mode), .as_a(as_a), .as_b(as_b), .as_s(as_s), .as_cout(as_cout),
    .hng_in(hng_in), .hng_out(hng_out), .paog_in(paog_in), .paog_out(paog_out)
  );

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_pair(logic [63:0] va, logic [63:0] vb, logic mode);
    longint unsigned ia, ib, m;
    logic [63:0] e;
    logic [15:0] ec;
    ia = bcd2int(va, DIGITS);
    ib = bcd2int(vb, DIGITS);
    add_a = va[W-1:0]; add_b = vb[W-1:0];
    sub_a = va[W-1:0]; sub_b = vb[W-1:0];
    as_a  = va[W-1:0]; as_b  = vb[W-1:0]; as_mode = mode;
    #1;
    // adder
    e  = int2bcd((ia + ib) % pow10(DIGITS), DIGITS);
    ec = add_carries(va, vb, DIGITS);
    check(add_s === e[W-1:0] && add_cout === ec[DIGITS-1:0],
          $sformatf("add %h + %h gave %h/%b", add_a, add_b, add_s, add_cout));
    for (int i = 0; i < int'(DIGITS); i++)
      if (int'(va[4*i +: 4]) + int'(vb[4*i +: 4]) + ((i > 0) ? int'(ec[i-1]) : 0) > 9)
        n_add_fix++;
    if (ec[DIGITS-1:0] == '1) n_add_ripple++;
    if (ec[DIGITS-1]) n_add_cout++;
    // subtractor
    m = (ia > ib) ? ia - ib : ib - ia;
    e = int2bcd(m, DIGITS);
    check(sub_diff === e[W-1:0] && sub_neg === (ia <= ib),
          $sformatf("sub %h - %h gave %h neg %b", sub_a, sub_b, sub_diff, sub_neg));
    if (ia > ib) n_sub_eac++; else n_sub_nines++;
    if (ia == ib) n_sub_negzero++;
    // DKG adder/subtractor
    if (!mode) begin
      e  = int2bcd((ia + ib) % pow10(DIGITS), DIGITS);
      ec = add_carries(va, vb, DIGITS);
      if (ec[DIGITS-1:0] != '0) n_as_addfix++;
    end else begin
      e  = int2bcd((ia + pow10(DIGITS) - ib) % pow10(DIGITS), DIGITS);
      ec = sub_borrows(va, vb, DIGITS);
      if (ec[DIGITS-1:0] != '0) n_as_subfix++;
      if (ec[DIGITS-1]) n_as_borrow++;
    end
    check(as_s === e[W-1:0] && as_cout === ec[DIGITS-1:0],
          $sformatf("addsub mode %b %h, %h gave %h/%b", mode, as_a, as_b, as_s, as_cout));
  endtask

  initial begin
    // HNG and PAOG gates, all inputs
    for (int i = 0; i < 16; i++) begin
      int t;
      hng_in = 4'(i); paog_in = 4'(i);
      #1;
      t = int'(hng_in[0]) + int'(hng_in[1]) + int'(hng_in[2]);
      check(hng_out === {t[1] ^ hng_in[3], t[0], hng_in[1], hng_in[0]}, "hng");
      if (!hng_in[3]) n_hng_fa++;
      check(paog_out[0] === paog_in[0] && paog_out[1] === (paog_in[0] ^ paog_in[1])
            && paog_out[2] === ((paog_in[0] & paog_in[1]) ^ paog_in[2])
            && paog_out[3] === ^{paog_out[1], paog_in[3], paog_out[2]}, "paog");
      n_paog++;
    end
    // directed: ripple through all digits, equality, both signs
    run_pair(int2bcd(pow10(DIGITS) - 1, DIGITS), int2bcd(1, DIGITS), 1'b0);
    run_pair(int2bcd(pow10(DIGITS) - 1, DIGITS), int2bcd(1, DIGITS), 1'b1);
    run_pair(int2bcd(1, DIGITS), int2bcd(pow10(DIGITS) - 1, DIGITS), 1'b1);
    run_pair(int2bcd(31415926, DIGITS), int2bcd(31415926, DIGITS), 1'b1);
    run_pair(int2bcd(27182818, DIGITS), int2bcd(14142135, DIGITS), 1'b0);
    for (int i = 0; i < int'(N_RANDOM); i++)
      run_pair(rand_bcd(DIGITS), rand_bcd(DIGITS), 1'($urandom_range(1)));

    $display("mechanisms: add_fix=%0d add_ripple=%0d add_cout=%0d sub_eac=%0d sub_nines=%0d sub_negzero=%0d as_addfix=%0d as_subfix=%0d as_borrow=%0d hng_fa=%0d paog=%0d",
             n_add_fix, n_add_ripple, n_add_cout, n_sub_eac, n_sub_nines, n_sub_negzero,
             n_as_addfix, n_as_subfix, n_as_borrow, n_hng_fa, n_paog);
    if (n_add_fix == 0 || n_add_ripple == 0 || n_add_cout == 0 || n_sub_eac == 0
        || n_sub_nines == 0 || n_sub_negzero == 0 || n_as_addfix == 0 || n_as_subfix == 0
        || n_as_borrow == 0 || n_hng_fa == 0 || n_paog == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
