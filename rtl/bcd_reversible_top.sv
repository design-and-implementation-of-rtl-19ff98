// bcd_reversible_top: the reversible BCD arithmetic units side by side.
//   add_*  DIGITS-digit BCD adder from Peres-gate digit adders
//   sub_*  DIGITS-digit BCD subtractor, nine's complement method with TR-gate
//          complement units, result as sign and magnitude
//   as_*   DIGITS-digit BCD adder/subtractor from programmable DKG gates
//   hng_*, paog_*  the two 4x4 gates of the library that none of the three
//          units uses, brought out on their own ({d,c,b,a} in, {s,r,q,p} out)
// The three units are independent designs sharing no signal; each has its
// own operand ports. DIGITS = 8 gives the 32-bit units. Everything is
// combinational: outputs follow the inputs after the gate delays.
module bcd_reversible_top
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = BCD_DIGITS
) (
  input  logic [4*DIGITS-1:0] add_a,
  input  logic [4*DIGITS-1:0] add_b,
  output logic [4*DIGITS-1:0] add_s,
  output logic [DIGITS-1:0]   add_cout,

  input  logic [4*DIGITS-1:0] sub_a,
  input  logic [4*DIGITS-1:0] sub_b,
  output logic [4*DIGITS-1:0] sub_diff,
  output logic                sub_neg,
  output logic [DIGITS-1:0]   sub_cout,

  input  logic                as_mode,   // 0 add, 1 subtract
  input  logic [4*DIGITS-1:0] as_a,
  input  logic [4*DIGITS-1:0] as_b,
  output logic [4*DIGITS-1:0] as_s,
  output logic [DIGITS-1:0]   as_cout,

  input  logic [3:0]          hng_in,
  output logic [3:0]          hng_out,
  input  logic [3:0]          paog_in,
  output logic [3:0]          paog_out
);
  addsub_mode_e mode;
  assign mode = addsub_mode_e'(as_mode);

  bcd_adder #(.DIGITS(DIGITS)) u_adder (
    .a(add_a), .b(add_b), .s(add_s), .cout(add_cout)
  );

  bcd_subtractor #(.DIGITS(DIGITS)) u_subtractor (
    .a(sub_a), .b(sub_b), .diff(sub_diff), .neg(sub_neg), .cout(sub_cout)
  );

  dkg_addsub #(.DIGITS(DIGITS)) u_addsub (
    .mode(mode), .a(as_a), .b(as_b), .s(as_s), .cout(as_cout)
  );

  hng_gate u_hng (
    .a(hng_in[0]), .b(hng_in[1]), .c(hng_in[2]), .d(hng_in[3]),
    .p(hng_out[0]), .q(hng_out[1]), .r(hng_out[2]), .s(hng_out[3])
  );

  paog_gate u_paog (
    .a(paog_in[0]), .b(paog_in[1]), .c(paog_in[2]), .d(paog_in[3]),
    .p(paog_out[0]), .q(paog_out[1]), .r(paog_out[2]), .s(paog_out[3])
  );
endmodule
