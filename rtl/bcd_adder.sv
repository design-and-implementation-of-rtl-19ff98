// bcd_adder: DIGITS-digit reversible BCD adder (8 digits = 32-bit operands).
// DIGITS copies of the BCD digit adder are cascaded: digit i adds a and b
// bits [4i+3:4i] and the decimal carry of digit i-1; digit 0 has no carry
// in. Every digit's carry out is brought out on cout[i] (cout[DIGITS-1] is the
// carry of the whole sum), as in the block diagram of the cascaded adder.
// Operands must be packed BCD. Purely combinational; the carry ripples
// through all digits, so the delay grows with DIGITS.
module bcd_adder
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = BCD_DIGITS
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  output logic [4*DIGITS-1:0] s,
  output logic [DIGITS-1:0]   cout
);
  logic [DIGITS:0] carry;

  assign carry[0] = 1'b0;
  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    bcd_adder_digit u_digit (
      .a(a[4*i +: 4]), .b(b[4*i +: 4]), .cin(carry[i]),
      .s(s[4*i +: 4]), .cout(carry[i+1])
    );
  end
  assign cout = carry[DIGITS:1];
endmodule
