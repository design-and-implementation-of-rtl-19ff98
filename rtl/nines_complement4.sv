// nines_complement4: 4-bit reversible nine's complement unit.
// Forms 9 - b for a BCD digit b by subtracting b from the constant 1001 in a
// 4-bit ripple subtractor of TR-gate full subtractors. The final borrow is
// always 0 for b <= 9 and is left as garbage. Purely combinational.
module nines_complement4
  import bcd_pkg::*;
(
  input  bcd_digit_t b,
  output bcd_digit_t nc
);
  logic [4:0] borrow;

  assign borrow[0] = 1'b0;
  for (genvar i = 0; i < 4; i++) begin : g_fs
    tr_full_subtractor u_fs (
      .x(BCD_NINE[i]), .y(b[i]), .bin(borrow[i]), .diff(nc[i]), .bout(borrow[i+1])
    );
  end
endmodule
