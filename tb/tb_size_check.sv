// tb_size_check: checker used by tb_table1_sizes. Builds the whole design at
// DIGITS digits, applies N random packed-BCD operand pairs (plus an all-nines
// plus one case) to the adder, the subtractor and the DKG adder/subtractor in
// both modes, compares with integer arithmetic, then raises done with its
// check and failure counts. DIGITS may be 1 to 16.
module tb_size_check #(
  parameter int unsigned DIGITS = 8,
  parameter int unsigned N = 2000
) (
  output bit done,
  output int checks,
  output int failures
);
  import tb_bcd_util_pkg::*;
  localparam int unsigned W = 4 * DIGITS;

  logic [W-1:0] a, b, add_s, sub_diff, as_s;
  logic [DIGITS-1:0] add_cout, sub_cout, as_cout;
  logic sub_neg, as_mode;
  logic [3:0] g_hng, g_paog;

  bcd_reversible_top #(.DIGITS(DIGITS)) dut (
    .add_a(a), .add_b(b), .add_s(add_s), .add_cout(add_cout),
    .sub_a(a), .sub_b(b), .sub_diff(sub_diff), .sub_neg(sub_neg), .sub_cout(sub_cout),
    .as_mode(as_mode), .as_a(a), .as_b(b), .as_s(as_s), .as_cout(as_cout),
    .hng_in(4'd0), .hng_out(g_hng), .paog_in(4'd0), .paog_out(g_paog)
  );

  task automatic one(logic [63:0] va, logic [63:0] vb);
    longint unsigned ia, ib, p;
    logic [63:0] e_add, e_sub, e_as;
    ia = bcd2int(va, DIGITS);
    ib = bcd2int(vb, DIGITS);
    p  = pow10(DIGITS);
    e_add = int2bcd((ia + ib) % p, DIGITS);
    e_sub = int2bcd((ia > ib) ? ia - ib : ib - ia, DIGITS);
    e_as  = int2bcd((ia + p - ib) % p, DIGITS);
    a = va[W-1:0]; b = vb[W-1:0];
    as_mode = 1'b0;
    #1;
    checks += 3;
    if (add_s !== e_add[W-1:0] || add_cout[DIGITS-1] !== (ia + ib >= p)) failures++;
    if (sub_diff !== e_sub[W-1:0] || sub_neg !== (ia <= ib)) failures++;
    if (as_s !== e_add[W-1:0] || as_cout[DIGITS-1] !== (ia + ib >= p)) failures++;
    as_mode = 1'b1;
    #1;
    checks++;
    if (as_s !== e_as[W-1:0] || as_cout[DIGITS-1] !== (ia < ib)) failures++;
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    one(int2bcd(pow10(DIGITS) - 1, DIGITS), int2bcd(1, DIGITS));
    for (int i = 0; i < int'(N); i++) one(rand_bcd(DIGITS), rand_bcd(DIGITS));
    done = 1;
  end
endmodule
