// hng_gate: the 4x4 reversible HNG gate.
// P = A, Q = B, R = A xor B xor C, S = (A xor B)C xor (AB xor D). With D = 0 the
// R and S outputs are the sum and carry of a full adder of A, B and C.
// Standalone gate of the library; purely combinational.
module hng_gate (
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
    q = b;
    r = a ^ b ^ c;
    s = ((a ^ b) & c) ^ ((a & b) ^ d);
  end
endmodule
