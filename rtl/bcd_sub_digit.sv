// bcd_sub_digit: 4-bit reversible BCD subtraction unit (one decimal digit).
// The nine's complement unit turns b into 9 - b, and a BCD digit adder adds it
// to a with the carry in: s = a + (9 - b) + cin (decimal), cout its decimal
// carry. Chained over all digits this adds the nine's complement of the whole
// subtrahend. Purely combinational: the TR-gate subtractor followed by the
// digit adder.
module bcd_sub_digit
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t s,
  output logic       cout
);
  bcd_digit_t b_nc;

  nines_complement4 u_nc  (.b(b), .nc(b_nc));
  bcd_adder_digit   u_add (.a(a), .b(b_nc), .cin(cin), .s(s), .cout(cout));
endmodule
