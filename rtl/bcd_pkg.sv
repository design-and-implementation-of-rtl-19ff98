// bcd_pkg: shared types and constants of the reversible BCD arithmetic units.
// A BCD digit is a 4-bit binary code of 0..9. Adding two digits in binary and
// then adding 0110 when the binary sum passes 9 gives the decimal digit; the
// nine's complement of a digit is 1001 minus the digit. The default digit count
// of eight (a 32-bit operand) is the configuration the design is built around;
// the per-digit carries are brought out as in the block diagrams of the
// cascaded units.
package bcd_pkg;
  typedef logic [3:0] bcd_digit_t;

  localparam bcd_digit_t BCD_CORRECTION = 4'b0110;  // added when a digit sum exceeds 9
  localparam bcd_digit_t BCD_NINE       = 4'b1001;  // minuend of the nine's complement
  localparam int unsigned BCD_DIGITS    = 8;        // 8 digits = 32-bit operands

  // Mode encoding of the programmable DKG adder/subtractor: the value drives
  // the A (control) input of every DKG gate.
  typedef enum logic {
    MODE_ADD = 1'b0,
    MODE_SUB = 1'b1
  } addsub_mode_e;
endpackage
