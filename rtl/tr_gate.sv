// tr_gate: the 3x3 reversible TR gate, a gate designed for binary subtractors.
// P = A, Q = A xor B, R = AB' xor C. With C = 0 it is a half subtractor of B - A
// (Q = difference, R = borrow); two of them make a full subtractor. The
// original BCD subtractor design names this gate without giving its
// equations; the ones used here are the gate's published definition.
// Purely combinational.
module tr_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & ~b) ^ c;
  end
endmodule
