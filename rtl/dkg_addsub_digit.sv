// dkg_addsub_digit: 4-bit reversible BCD adder/subtractor built from the
// programmable DKG gate (one decimal digit).
// mode = MODE_ADD: s = a + b + cin (decimal), cout = decimal carry.
// mode = MODE_SUB: s = a - b - cin (decimal, mod 10), cout = decimal borrow.
// Stage 1 is a ripple of four DKG gates, all programmed by mode (their A
// input): full adders when adding, full subtractors when subtracting. A
// correction K is then needed when adding if the binary sum exceeds 9
// (K = c4 | s3(s2 | s1)) and when subtracting if the binary difference
// borrowed (K = c4; the 4-bit result is then 6..15 and 6 too large). Stage 2,
// four more DKG gates in the same mode, adds or subtracts {0,K,K,0} modulo 16.
// K is the decimal carry or borrow of the digit. The mode signal is fanned
// out with Feynman gates (a DKG gate does not pass its A input through); the
// test uses Peres, Feynman and Fredkin gates. That the adder/subtractor is
// built from DKG gates follows the design; its internal structure is this
// design's own. Operands must be BCD digits. Purely combinational.
module dkg_addsub_digit
  import bcd_pkg::*;
(
  input  addsub_mode_e mode,
  input  bcd_digit_t   a,
  input  bcd_digit_t   b,
  input  logic         cin,    // carry in (add) or borrow in (subtract)
  output bcd_digit_t   s,
  output logic         cout    // decimal carry (add) or borrow (subtract)
);
  logic [8:0] m;               // copies of mode, one per DKG gate plus the test
  logic [4:0] c;               // stage-1 carry / borrow chain
  logic [4:0] c2;              // stage-2 chain (its last bit is garbage)
  bcd_digit_t bin;             // stage-1 binary sum / difference
  bcd_digit_t fix;             // {0, K, K, 0}
  logic       x12, a12, or12, gt9, gt9_add, k;
  logic       g_fan_last, g_p0, g_p1, g_p2, g_q2, g_p3, g_p4, g_r;
  logic [7:0] g_dkg_p, g_dkg_q;

  // fan mode out: each Feynman gate keeps one copy going and hands one off
  logic [9:0] m_chain;
  assign m_chain[0] = mode;
  for (genvar i = 0; i < 9; i++) begin : g_mode_fan
    feynman_gate u_fo (.a(m_chain[i]), .b(1'b0), .p(m_chain[i+1]), .q(m[i]));
  end
  assign g_fan_last = m_chain[9];

  // stage 1: binary add / subtract
  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_stage1
    dkg_gate u_dkg (
      .a(m[i]), .b(a[i]), .c(b[i]), .d(c[i]),
      .p(g_dkg_p[i]), .q(g_dkg_q[i]), .r(c[i+1]), .s(bin[i])
    );
  end

  // correction test: K = c4 xor (mode ? 0 : s3(s2 | s1))
  peres_gate   u_pg_or  (.a(bin[1]), .b(bin[2]), .c(1'b0), .p(g_p0), .q(x12), .r(a12));
  feynman_gate u_fg_or  (.a(a12), .b(x12), .p(g_p1), .q(or12));
  peres_gate   u_pg_and (.a(bin[3]), .b(or12), .c(1'b0), .p(g_p2), .q(g_q2), .r(gt9));
  fredkin_gate u_fr_md  (.a(m[8]), .b(gt9), .c(1'b0), .p(g_p3), .q(gt9_add), .r(g_r));
  feynman_gate u_fg_k   (.a(c[4]), .b(gt9_add), .p(g_p4), .q(k));

  // stage 2: add / subtract 0110 when K
  assign fix = {1'b0, k, k, 1'b0};
  assign c2[0] = 1'b0;
  for (genvar i = 0; i < 4; i++) begin : g_stage2
    dkg_gate u_dkg (
      .a(m[4+i]), .b(bin[i]), .c(fix[i]), .d(c2[i]),
      .p(g_dkg_p[4+i]), .q(g_dkg_q[4+i]), .r(c2[i+1]), .s(s[i])
    );
  end
  assign cout = k;
endmodule
