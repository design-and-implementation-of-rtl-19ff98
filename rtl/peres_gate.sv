// peres_gate: the 3x3 reversible Peres gate.
// P = A, Q = A xor B, R = AB xor C. With C = 0 it is a half adder (Q = sum,
// R = carry); two of them make the full adders of the BCD digit adder.
// Purely combinational.
module peres_gate (
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
    r = (a & b) ^ c;
  end
endmodule
