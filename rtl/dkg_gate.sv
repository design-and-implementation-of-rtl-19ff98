// dkg_gate: the 4x4 programmable reversible DKG gate.
// P = B, Q = A'C + AD', R = (A xor B)(C xor D) xor CD, S = B xor C xor D.
// A is the programming input. With A = 0, R is the carry and S the sum of a
// full adder of B, C and D; with A = 1, R is the borrow and S the difference
// of B - C - D. The BCD adder/subtractor uses it as its one programmable cell.
// Purely combinational.
module dkg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = b;
    q = (~a & c) | (a & ~d);
    r = ((a ^ b) & (c ^ d)) ^ (c & d);
    s = b ^ c ^ d;
  end
endmodule
