// bcd_correction: error correction unit of a BCD digit adder.
// Input is the 5-bit binary sum {c4, s} of two BCD digits and a carry (0..19).
// The unit tests whether it exceeds 9, K = c4 | s3(s2 | s1), adds 0110 to s
// with a 4-bit reversible adder, and lets four Fredkin gates, used as 2:1
// multiplexers controlled by K, pass either s (K = 0) or s + 0110 (K = 1).
// K is the decimal carry out of the digit.
// Reversible-style details: the sum bits are fanned out with Feynman gates;
// s1 | s2 is formed as (s1 xor s2) xor s1s2 from a Peres and a Feynman gate;
// the last Peres gate forms s3(s2 | s1) xor c4, which equals the OR because
// c4 = 1 only for sums 16..19, where s3 = 0. K is handed from multiplexer to
// multiplexer through the Fredkin gates' pass-through output.
// The adder and the 0110 correction follow the flow of the digit adder; the
// gate-level form of the test and of the selection is this design's own.
// Inputs above 19 (non-BCD operands) are outside its range. Combinational.
module bcd_correction
  import bcd_pkg::*;
(
  input  bcd_digit_t s,      // low four bits of the binary digit sum
  input  logic       c4,     // fifth bit (binary carry) of the digit sum
  output bcd_digit_t d,      // corrected BCD digit
  output logic       cout    // decimal carry: the sum was above 9
);
  bcd_digit_t s_det;         // copies of s for the test
  bcd_digit_t s_add;         // copies of s for the correction adder
  bcd_digit_t s_fix;         // s + 0110
  logic       g_cout;        // garbage: carry of the correction adder
  logic       x12, a12, or12, g_p0, g_p1, g_p2, g_q2;
  bcd_digit_t g_mux_r;       // garbage: the unselected input of each multiplexer
  logic [4:0] k_chain;

  for (genvar i = 0; i < 4; i++) begin : g_fanout
    feynman_gate u_fo (.a(s[i]), .b(1'b0), .p(s_det[i]), .q(s_add[i]));
  end

  // greater-than-nine test
  peres_gate   u_pg_or  (.a(s_det[1]), .b(s_det[2]), .c(1'b0), .p(g_p0), .q(x12), .r(a12));
  feynman_gate u_fg_or  (.a(a12), .b(x12), .p(g_p1), .q(or12));
  peres_gate   u_pg_k   (.a(s_det[3]), .b(or12), .c(c4), .p(g_p2), .q(g_q2), .r(k_chain[0]));

  // add 0110
  rev_adder4 u_fix (.a(s_add), .b(BCD_CORRECTION), .cin(1'b0), .sum(s_fix), .cout(g_cout));

  // select s or s + 0110
  for (genvar i = 0; i < 4; i++) begin : g_sel
    fredkin_gate u_mux (
      .a(k_chain[i]), .b(s_det[i]), .c(s_fix[i]),
      .p(k_chain[i+1]), .q(d[i]), .r(g_mux_r[i])
    );
  end
  assign cout = k_chain[4];
endmodule
