// dkg_addsub: DIGITS-digit reversible BCD adder/subtractor (8 digits = 32
// bits) built from DKG-gate digits, with one mode input for all of them.
// mode = MODE_ADD: s = a + b; cout[DIGITS-1] is the carry of the sum.
// mode = MODE_SUB: s = a - b modulo 10^DIGITS; cout[DIGITS-1] is the final
// borrow, set when a < b, in which case s is the ten's complement of b - a.
// Digit i takes the carry or borrow of digit i-1; digit 0 takes none. Every
// digit's carry/borrow out is brought out on cout[i], as for the adder and
// the subtractor. Operands must be packed BCD. Purely combinational; the
// carry/borrow ripples through all digits.
module dkg_addsub
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = BCD_DIGITS
) (
  input  addsub_mode_e        mode,
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  output logic [4*DIGITS-1:0] s,
  output logic [DIGITS-1:0]   cout
);
  logic [DIGITS:0] carry;

  assign carry[0] = 1'b0;
  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    dkg_addsub_digit u_digit (
      .mode(mode), .a(a[4*i +: 4]), .b(b[4*i +: 4]), .cin(carry[i]),
      .s(s[4*i +: 4]), .cout(carry[i+1])
    );
  end
  assign cout = carry[DIGITS:1];
endmodule
