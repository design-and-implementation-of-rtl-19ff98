// bcd_adder_digit: 4-bit reversible BCD addition unit (one decimal digit).
// A 4-bit reversible binary adder forms a + b + cin (0..19); the error
// correction unit then adds 0110 when that sum is above 9 and raises the
// decimal carry. a and b must be BCD digits (0..9). Purely combinational:
// four carry steps in the binary adder, the > 9 test, four carry steps in
// the correction adder and one multiplexer level.
// The structure (binary add, test S > 9, add 0110, carry "count") follows the
// digit adder's flow; the carry input, used to cascade digits, is this
// design's addition.
module bcd_adder_digit
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t s,
  output logic       cout
);
  bcd_digit_t bin_sum;
  logic       bin_c4;

  rev_adder4     u_add (.a(a), .b(b), .cin(cin), .sum(bin_sum), .cout(bin_c4));
  bcd_correction u_cor (.s(bin_sum), .c4(bin_c4), .d(s), .cout(cout));
endmodule
