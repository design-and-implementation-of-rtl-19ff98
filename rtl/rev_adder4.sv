// rev_adder4: 4-bit reversible binary adder, the first stage of a BCD digit.
// Four Peres-gate full adders are chained carry to carry (carry-propagate
// fashion): sum = a + b + cin, with cout the fifth sum bit. Used both for the
// digit sum and for adding the 0110 correction. Purely combinational; the
// delay is four full-adder carry steps.
module rev_adder4
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t sum,
  output logic       cout
);
  logic [4:0] carry;

  assign carry[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_fa
    peres_full_adder u_fa (
      .x(a[i]), .y(b[i]), .cin(carry[i]), .sum(sum[i]), .cout(carry[i+1])
    );
  end
  assign cout = carry[4];
endmodule
