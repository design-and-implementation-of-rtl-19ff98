// bcd_subtractor: DIGITS-digit reversible BCD subtractor (8 digits = 32 bits),
// nine's complement method, result as sign and magnitude.
// Stage 1: DIGITS cascaded digit subtractors form r = a + nines(b) with no
// carry in; cout[i] are their decimal carries (cout[DIGITS-1] = end carry c).
// Stage 2 applies the rule of the nine's complement method without a loop:
//   c = 1 (a > b):  diff = r + 1, the end-around carry, added by a second
//                   chain of BCD digit adders whose b inputs are 0 and whose
//                   first carry in is c;             neg = 0
//   c = 0 (a <= b): diff = nines(r), one nine's complement unit per digit;
//                   neg = 1
// One Fredkin multiplexer per bit picks between the two, with c handed from
// gate to gate through their pass-through outputs. As in every nine's
// complement subtractor, a = b gives the "negative zero": diff = 0, neg = 1.
// The subtractor digits (nine's complement plus BCD addition) and the
// per-digit carries follow the design; feeding the end carry back into the
// first digit would form a loop, which reversible circuits forbid, so the
// end-around carry is added by the separate second stage, a choice of this
// design. Purely combinational; two digit-carry ripples long.
module bcd_subtractor
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = BCD_DIGITS
) (
  input  logic [4*DIGITS-1:0] a,     // minuend, packed BCD
  input  logic [4*DIGITS-1:0] b,     // subtrahend, packed BCD
  output logic [4*DIGITS-1:0] diff,  // |a - b|, packed BCD
  output logic                neg,   // 1 when a <= b (see negative zero above)
  output logic [DIGITS-1:0]   cout   // stage-1 decimal carry of each digit
);
  logic [DIGITS:0]      c1;          // stage-1 carry chain
  logic [DIGITS:0]      c2;          // end-around-carry chain
  logic [4*DIGITS-1:0]  r;           // a + nines(b)
  logic [4*DIGITS-1:0]  r_inc;       // r + 1
  logic [4*DIGITS-1:0]  r_nc;        // nines(r)
  logic [4*DIGITS:0]    sel;         // end carry, passed along the multiplexers
  logic [4*DIGITS-1:0]  g_mux_r;     // garbage: the unselected multiplexer inputs
  logic                 g_c2;        // garbage: never set, since a - b < 10^DIGITS

  assign c1[0] = 1'b0;
  for (genvar i = 0; i < DIGITS; i++) begin : g_stage1
    bcd_sub_digit u_digit (
      .a(a[4*i +: 4]), .b(b[4*i +: 4]), .cin(c1[i]),
      .s(r[4*i +: 4]), .cout(c1[i+1])
    );
  end
  assign cout = c1[DIGITS:1];

  assign c2[0] = c1[DIGITS];
  for (genvar i = 0; i < DIGITS; i++) begin : g_stage2
    bcd_adder_digit u_inc (
      .a(r[4*i +: 4]), .b('0), .cin(c2[i]),
      .s(r_inc[4*i +: 4]), .cout(c2[i+1])
    );
    nines_complement4 u_nc (.b(r[4*i +: 4]), .nc(r_nc[4*i +: 4]));
  end
  assign g_c2 = c2[DIGITS];

  assign sel[0] = c1[DIGITS];
  for (genvar j = 0; j < 4*DIGITS; j++) begin : g_sel
    fredkin_gate u_mux (
      .a(sel[j]), .b(r_nc[j]), .c(r_inc[j]),
      .p(sel[j+1]), .q(diff[j]), .r(g_mux_r[j])
    );
  end
  assign neg = ~sel[4*DIGITS];
endmodule
