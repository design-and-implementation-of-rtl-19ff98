// paog_gate: the 4x4 programmable Peres And-Or gate (PAOG), an extension of
// the Peres gate for ALU use.
// P = A, Q = A xor B, R = AB xor C, S = ((A xor B) xor D) xor (AB xor C).
// The S equation is the one of the gate's block diagram; the written form of
// the same description, (AB xor C)C xor ((A xor B) xor D), disagrees with it.
// Both keep the gate reversible because P, Q, R determine A, B, C and S then
// determines D. Standalone gate of the library; purely combinational.
module paog_gate (
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
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
    s = ((a ^ b) ^ d) ^ ((a & b) ^ c);
  end
endmodule
